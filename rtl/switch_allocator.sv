// switch_allocator: separable, input-first round-robin switch allocation.
//
// Stage 1: in each input port, a round-robin arbiter picks one of the VCs that
// have a flit ready and a credit for their output VC. Stage 2: in each output
// port, a round-robin arbiter picks one of the input ports whose stage-1 winner
// wants that output. A VC is granted when its input port wins stage 2. The
// stage-1 pointer of an input port only advances when that port wins stage 2.
// Grants are combinational in the cycle of the request; the router pops the
// granted flit and drives the crossbar in the same cycle. Round-robin follows
// the published router; the separable input-first structure is this design's
// choice.
module switch_allocator
  import noc_pkg::*;
(
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic   [NUM_PORTS-1:0][NUM_VCS-1:0]       req,
  input  port_e  [NUM_PORTS-1:0][NUM_VCS-1:0]       req_port,
  output logic   [NUM_PORTS-1:0][NUM_VCS-1:0]       vc_grant,
  output logic   [NUM_PORTS-1:0]                    out_valid,  // output port o sends a flit
  output port_e  [NUM_PORTS-1:0]                    out_sel     // input port that drives output o
);
  logic  [NUM_PORTS-1:0][NUM_VCS-1:0]   s1_gnt;
  logic  [NUM_PORTS-1:0]                s1_valid;
  port_e [NUM_PORTS-1:0]                s1_port;
  logic  [NUM_PORTS-1:0][NUM_PORTS-1:0] s2_req;   // [output][input]
  logic  [NUM_PORTS-1:0][NUM_PORTS-1:0] s2_gnt;   // [output][input]
  logic  [NUM_PORTS-1:0]                in_won;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    rr_arbiter #(.N(NUM_VCS)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (req[p]),
      .advance (in_won[p]),
      .grant   (s1_gnt[p])
    );
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (s2_req[o]),
      .advance (1'b1),
      .grant   (s2_gnt[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      s1_valid[p] = |s1_gnt[p];
      s1_port[p]  = P_LOCAL;
      for (int v = 0; v < NUM_VCS; v++) begin
        if (s1_gnt[p][v]) s1_port[p] = req_port[p][v];
      end
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        s2_req[o][p] = s1_valid[p] && (s1_port[p] == port_e'(o));
      end
    end
    in_won = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = |s2_gnt[o];
      out_sel[o]   = P_LOCAL;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (s2_gnt[o][p]) begin
          out_sel[o] = port_e'(p);
          in_won[p]  = 1'b1;
        end
      end
    end
    for (int p = 0; p < NUM_PORTS; p++) begin
      vc_grant[p] = in_won[p] ? s1_gnt[p] : '0;
    end
  end

endmodule
