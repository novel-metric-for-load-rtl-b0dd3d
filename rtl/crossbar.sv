// crossbar: the router's N_IN x N_OUT switch.
//
// Each output port o carries the flit of input port sel[o] when sel_valid[o]
// is high, and an empty (invalid) link otherwise. The switch allocator makes
// sure at most one output selects each input. It is purely combinational; the
// router registers its outputs on the links. The link record carries the
// output VC chosen for the flit along with the flit.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned N_IN  = NUM_PORTS,
  parameter int unsigned N_OUT = NUM_PORTS
) (
  input  link_t [N_IN-1:0]                         in_link,
  input  logic  [N_OUT-1:0]                        sel_valid,
  input  logic  [N_OUT-1:0][$clog2(N_IN)-1:0]      sel,
  output link_t [N_OUT-1:0]                        out_link
);
  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out_link[o] = '0;
      if (sel_valid[o] && (int'(sel[o]) < N_IN)) begin
        out_link[o]       = in_link[sel[o]];
        out_link[o].valid = 1'b1;
      end
    end
  end
endmodule
