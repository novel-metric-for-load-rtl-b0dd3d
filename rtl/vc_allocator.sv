// vc_allocator: round-robin virtual-channel allocation for one router.
//
// Every input VC whose head flit is a header, and which holds no output VC yet,
// requests one output port and gives a mask of the output VCs it may take.
// For each output port, a round-robin arbiter picks one requester among those
// for which a free VC in their mask exists. The winner gets the lowest-numbered
// free VC in its mask. So each output port grants at most one VC per cycle.
// Inputs and grants are in the same cycle; the router records the grant at the
// clock edge. The use of round-robin follows the published router. The
// one-grant-per-port-per-cycle structure is this design's choice.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NIN = NUM_PORTS * NUM_VCS   // input VCs
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic  [NIN-1:0]                       req,
  input  port_e [NIN-1:0]                       req_port,
  input  logic  [NIN-1:0][NUM_VCS-1:0]          req_mask,
  input  logic  [NUM_PORTS-1:0][NUM_VCS-1:0]    ovc_busy,
  output logic  [NIN-1:0]                       grant,
  output vc_id_t [NIN-1:0]                      grant_vc
);
  logic [NUM_PORTS-1:0][NIN-1:0] port_req;
  logic [NUM_PORTS-1:0][NIN-1:0] port_gnt;

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int i = 0; i < NIN; i++) begin
        port_req[o][i] = req[i] && (req_port[i] == port_e'(o)) &&
                         (|(req_mask[i] & ~ovc_busy[o]));
      end
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_port
    rr_arbiter #(.N(NIN)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (port_req[o]),
      .advance (1'b1),
      .grant   (port_gnt[o])
    );
  end

  always_comb begin
    logic [NUM_VCS-1:0] avail;
    avail = '0;
    for (int i = 0; i < NIN; i++) begin
      grant[i]    = 1'b0;
      grant_vc[i] = '0;
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (port_gnt[o][i]) begin
          grant[i] = 1'b1;
          avail    = req_mask[i] & ~ovc_busy[o];
          for (int v = NUM_VCS - 1; v >= 0; v--) begin
            if (avail[v]) grant_vc[i] = vc_id_t'(v);
          end
        end
      end
    end
  end

endmodule
