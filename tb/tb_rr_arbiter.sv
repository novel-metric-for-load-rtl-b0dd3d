// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// A reference model keeps its own priority pointer; random requests and random
// `advance` are applied for 2000 cycles and the one-hot grant is compared with
// the model every cycle. A directed part checks that two requesters that always
// request are served in alternation.
module tb_rr_arbiter;
  localparam int N = 15;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic advance;
  int checks = 0, failures = 0;
  int ptr_m;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .grant);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (N)'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0; ptr_m = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      req = N'($urandom);
      advance = ($urandom % 4) != 0;
      #1;
      checks++;
      if (grant !== model(req, ptr_m)) begin
        failures++;
        $display("cycle %0d: req=%b grant=%b expected=%b", c, req, grant, model(req, ptr_m));
      end
      if (advance && req != 0)
        for (int k = 0; k < N; k++) if (grant[k]) ptr_m = (k + 1) % N;
    end
    // two permanent requesters alternate
    @(negedge clk); req = 15'b00101; advance = 1;
    begin
      logic [N-1:0] last;
      #1 last = grant;
      for (int c = 0; c < 10; c++) begin
        @(negedge clk); #1;
        checks++;
        if (grant == last || !(grant == 15'b00001 || grant == 15'b00100)) begin
          failures++;
          $display("no alternation: %b after %b", grant, last);
        end
        last = grant;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
