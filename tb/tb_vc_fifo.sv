// tb_vc_fifo: self-checking test of the VC buffer.
// Random pushes and pops (never pushing a full or popping an empty buffer, as
// credit flow control guarantees) are mirrored in a queue. Every cycle the head
// flit, the count and the empty/full flags are compared with the queue. The
// buffer is also filled to its 5-flit depth to check `full`.
module tb_vc_fifo;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  flit_t push_flit, head;
  logic [$clog2(BUF_DEPTH+1)-1:0] count;
  flit_t q[$];
  int checks = 0, failures = 0;
  int saw_full = 0;

  vc_fifo dut (.clk, .rst_n, .push, .push_flit, .pop, .head, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == BUF_DEPTH)) begin
        failures++;
        $display("cycle %0d: count=%0d model=%0d empty=%b full=%b", c, count, q.size(), empty, full);
      end
      if (q.size() != 0) begin
        checks++;
        if (head != q[0]) begin failures++; $display("cycle %0d: head mismatch", c); end
      end
      if (q.size() == BUF_DEPTH) saw_full++;
      // bias: fill in the first phase, drain in the second, random later
      pop  = (q.size() != 0) && (c < 500 ? ($urandom % 4 == 0) : c < 1000 ? ($urandom % 4 != 0) : $urandom % 2);
      push = ((q.size() < BUF_DEPTH) || pop) && ($urandom % 2);
      push_flit = flit_t'({2'($urandom % 3), 32'($urandom)});
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(push_flit);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("buffer never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
