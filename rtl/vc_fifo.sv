// vc_fifo: the flit buffer of one virtual channel of an input port.
//
// A circular buffer of DEPTH flits (5 in the published set-up). A flit pushed
// in one cycle can be read at `head` from the next cycle on; `pop` removes the
// head at the clock edge. Push and pop may happen in the same cycle. `count`
// reports the occupancy, which the congestion metric needs. Credit-based flow
// control upstream guarantees that a full buffer is never pushed; the
// assertions check that and that an empty buffer is never popped.
module vc_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  flit_t                        push_flit,
  input  logic                         pop,
  output flit_t                        head,
  output logic                         empty,
  output logic                         full,
  output logic [$clog2(DEPTH+1)-1:0]   count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign head  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
