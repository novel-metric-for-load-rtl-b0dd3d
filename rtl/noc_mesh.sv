// noc_mesh: the complete network, a MESH_X x MESH_Y 2D mesh (7x7 by default).
//
// Each node has one noc_router and one network_interface. Node (x, y) has
// index y*MESH_X + x, where x is the column and y the row; north is row y-1.
// Neighbouring routers are joined by one physical channel in each direction.
// Each channel carries flits with their VC number one way and credits the
// other way, and every router also reads the congestion metric of its four
// neighbours. On the mesh border the unused router ports get no flits and no
// credits. Minimal routing never selects them. A border router sees a metric
// of 1.0 from a missing neighbour.
//
// The top's ports are the cores' side of the network interfaces, as arrays
// indexed by node: packet injection (valid/ready with destination and tag) and
// packet delivery (rx_* pulses). Each router's metric and per-cycle event
// flags are brought out for observation. The processing elements themselves
// are outside this design.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned NX    = MESH_X,
  parameter int unsigned NY    = MESH_Y,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic           [NX*NY-1:0]     inj_valid,
  input  coord_t         [NX*NY-1:0]     inj_dst_x,
  input  coord_t         [NX*NY-1:0]     inj_dst_y,
  input  tag_t           [NX*NY-1:0]     inj_tag,
  output logic           [NX*NY-1:0]     inj_ready,
  output logic           [NX*NY-1:0]     rx_valid,
  output coord_t         [NX*NY-1:0]     rx_src_x,
  output coord_t         [NX*NY-1:0]     rx_src_y,
  output tag_t           [NX*NY-1:0]     rx_tag,
  output logic [NX*NY-1:0][7:0]          rx_len,
  output logic           [NX*NY-1:0]     rx_err,
  output cm_t            [NX*NY-1:0]     node_cm,
  output router_events_t [NX*NY-1:0]     node_events
);
  localparam int unsigned N = NX * NY;

  link_t   [N-1:0][NUM_PORTS-1:0] r_in, r_out;
  credit_t [N-1:0][NUM_PORTS-1:0] r_cr_in, r_cr_out;   // cr_in: from downstream, cr_out: to upstream
  cm_t     [N-1:0][NUM_PORTS-1:0] r_nbr_cm;

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned ID = y * NX + x;

      // north neighbour (x, y-1): its south port faces us
      if (y > 0) begin : g_n
        assign r_in[ID][P_NORTH]     = r_out[ID-NX][P_SOUTH];
        assign r_cr_in[ID][P_NORTH]  = r_cr_out[ID-NX][P_SOUTH];
        assign r_nbr_cm[ID][P_NORTH] = node_cm[ID-NX];
      end else begin : g_n_edge
        assign r_in[ID][P_NORTH]     = '0;
        assign r_cr_in[ID][P_NORTH]  = '0;
        assign r_nbr_cm[ID][P_NORTH] = CM_ONE;
      end
      if (y < NY - 1) begin : g_s
        assign r_in[ID][P_SOUTH]     = r_out[ID+NX][P_NORTH];
        assign r_cr_in[ID][P_SOUTH]  = r_cr_out[ID+NX][P_NORTH];
        assign r_nbr_cm[ID][P_SOUTH] = node_cm[ID+NX];
      end else begin : g_s_edge
        assign r_in[ID][P_SOUTH]     = '0;
        assign r_cr_in[ID][P_SOUTH]  = '0;
        assign r_nbr_cm[ID][P_SOUTH] = CM_ONE;
      end
      if (x < NX - 1) begin : g_e
        assign r_in[ID][P_EAST]      = r_out[ID+1][P_WEST];
        assign r_cr_in[ID][P_EAST]   = r_cr_out[ID+1][P_WEST];
        assign r_nbr_cm[ID][P_EAST]  = node_cm[ID+1];
      end else begin : g_e_edge
        assign r_in[ID][P_EAST]      = '0;
        assign r_cr_in[ID][P_EAST]   = '0;
        assign r_nbr_cm[ID][P_EAST]  = CM_ONE;
      end
      if (x > 0) begin : g_w
        assign r_in[ID][P_WEST]      = r_out[ID-1][P_EAST];
        assign r_cr_in[ID][P_WEST]   = r_cr_out[ID-1][P_EAST];
        assign r_nbr_cm[ID][P_WEST]  = node_cm[ID-1];
      end else begin : g_w_edge
        assign r_in[ID][P_WEST]      = '0;
        assign r_cr_in[ID][P_WEST]   = '0;
        assign r_nbr_cm[ID][P_WEST]  = CM_ONE;
      end
      assign r_nbr_cm[ID][P_LOCAL] = CM_ONE;

      noc_router #(.DEPTH(DEPTH)) u_router (
        .clk        (clk),
        .rst_n      (rst_n),
        .my_x       (coord_t'(x)),
        .my_y       (coord_t'(y)),
        .in_link    (r_in[ID]),
        .in_credit  (r_cr_out[ID]),
        .out_link   (r_out[ID]),
        .out_credit (r_cr_in[ID]),
        .nbr_cm     (r_nbr_cm[ID]),
        .cm         (node_cm[ID]),
        .events     (node_events[ID])
      );

      network_interface #(.PKT_FLITS(PKT_LEN), .DEPTH(DEPTH)) u_ni (
        .clk                (clk),
        .rst_n              (rst_n),
        .my_x               (coord_t'(x)),
        .my_y               (coord_t'(y)),
        .pkt_valid          (inj_valid[ID]),
        .pkt_dst_x          (inj_dst_x[ID]),
        .pkt_dst_y          (inj_dst_y[ID]),
        .pkt_tag            (inj_tag[ID]),
        .pkt_ready          (inj_ready[ID]),
        .rx_valid           (rx_valid[ID]),
        .rx_src_x           (rx_src_x[ID]),
        .rx_src_y           (rx_src_y[ID]),
        .rx_tag             (rx_tag[ID]),
        .rx_len             (rx_len[ID]),
        .rx_err             (rx_err[ID]),
        .to_router          (r_in[ID][P_LOCAL]),
        .to_router_credit   (r_cr_out[ID][P_LOCAL]),
        .from_router        (r_out[ID][P_LOCAL]),
        .from_router_credit (r_cr_in[ID][P_LOCAL])
      );
    end
  end

endmodule
