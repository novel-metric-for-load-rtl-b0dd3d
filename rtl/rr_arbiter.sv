// rr_arbiter: round-robin arbiter over N requesters.
//
// The router uses round-robin for both VC and switch allocation. The grant is
// one-hot and combinational: the first requester at or after the priority
// pointer wins. When `advance` is high at a clock edge and a grant is given, the
// pointer moves to the requester after the winner, so the winner has the lowest
// priority next time. The pointer resets to requester 0. Putting the pointer
// update under an `advance` input, so that a grant lost further on does not use
// up a turn, is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr;
  logic [PW-1:0] winner;

  always_comb begin
    logic found;
    int unsigned idx;
    grant  = '0;
    winner = '0;
    found  = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = int'(ptr) + k;
      if (idx >= N) idx = idx - N;
      if (!found && req[idx]) begin
        found       = 1'b1;
        grant[idx]  = 1'b1;
        winner      = PW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && (|req)) begin
      ptr <= (int'(winner) == N - 1) ? '0 : winner + 1'b1;
    end
  end

  grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
