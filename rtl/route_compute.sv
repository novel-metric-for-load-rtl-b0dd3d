// route_compute: congestion-aware dynamic XY routing for one header flit.
//
// The routing follows the published algorithm. A packet for this node goes to
// the local port. A packet whose destination shares the row or the column goes
// straight towards it. Otherwise it has two productive directions, one in X and
// one in Y. It takes the one whose neighbouring router reports the smaller
// congestion metric. Only shortest paths are used.
//
// Choices of this design:
//  * Ties go to the X direction, so the decision is never random.
//  * Deadlock freedom uses three VC classes on the Y channels. On a north or
//    south output, eastbound packets may take only VC 0, westbound packets
//    only VC 1, and packets already in their destination column only VC 2.
//    X channels and the local port may use every VC. The eastbound and
//    westbound classes each move in one X direction only, and VC 2 only moves
//    straight to ejection, so no class can form a cycle of channel
//    dependencies. A packet may follow another packet into the same buffer
//    before that packet has left, so column-aligned packets must not share
//    VC 0 or VC 1: they would then wait behind a packet of another class.
// The unit is purely combinational; its outputs are valid in the same cycle.
module route_compute
  import noc_pkg::*;
(
  input  coord_t                   cur_x,
  input  coord_t                   cur_y,
  input  coord_t                   dst_x,
  input  coord_t                   dst_y,
  input  cm_t [NUM_PORTS-1:0]      nbr_cm,    // metric of the neighbour on each port
  output port_e                    out_port,
  output logic [NUM_VCS-1:0]       vc_mask,   // output VCs the packet may take
  output logic                     adaptive,  // two productive directions existed
  output logic                     chose_y,   // the Y direction was taken
  output logic                     cm_tie     // both neighbours reported the same metric
);
  port_e px, py;
  logic  x_east, x_west;

  always_comb begin
    x_east   = (dst_x > cur_x);
    x_west   = (dst_x < cur_x);
    px       = x_east ? P_EAST : P_WEST;
    py       = (dst_y < cur_y) ? P_NORTH : P_SOUTH;
    adaptive = 1'b0;
    chose_y  = 1'b0;
    cm_tie   = 1'b0;

    if (dst_x == cur_x && dst_y == cur_y) begin
      out_port = P_LOCAL;
    end else if (dst_x == cur_x) begin
      out_port = py;
    end else if (dst_y == cur_y) begin
      out_port = px;
    end else begin
      adaptive = 1'b1;
      cm_tie   = (nbr_cm[py] == nbr_cm[px]);
      chose_y  = (nbr_cm[py] < nbr_cm[px]);
      out_port = chose_y ? py : px;
    end

    vc_mask = '1;
    if (out_port == P_NORTH || out_port == P_SOUTH) begin
      if (x_east)      vc_mask = NUM_VCS'(1);
      else if (x_west) vc_mask = NUM_VCS'(2);
      else             vc_mask = NUM_VCS'(4);
    end
  end

endmodule
