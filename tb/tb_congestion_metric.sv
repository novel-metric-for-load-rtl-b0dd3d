// tb_congestion_metric: self-checking test of the congestion metric unit.
// The expected value is computed in floating point straight from the three
// published equations, Router status = (OutFlits/CandidateVCs) *
// (OutFlits/OutputPorts), occupancy rate = mean of the buffer occupancy rates,
// and CM = status * occupancy. It is then scaled to the unit's fixed point
// (x256) and truncated. CandidateVCs = 0 must give 1.0. The output is
// registered, so each value is checked one cycle after its inputs.
module tb_congestion_metric;
  import noc_pkg::*;
  localparam int NO = NUM_PORTS, V = NUM_PORTS*NUM_VCS, D = BUF_DEPTH;
  logic clk = 0, rst_n = 0;
  logic [$clog2(NO+1)-1:0]  out_flits;
  logic [$clog2(V+1)-1:0]   cand_vcs;
  logic [$clog2(V*D+1)-1:0] occ_sum;
  cm_t cm;
  logic cm_idle;
  int checks = 0, failures = 0;

  congestion_metric dut (.clk, .rst_n, .out_flits, .cand_vcs, .occ_sum, .cm, .cm_idle);

  always #5 clk = ~clk;

  function automatic int expected(int o, int c, int occ);
    real status, occ_rate, m;
    if (c == 0) return 1 << CM_FRAC;
    status   = (real'(o) / real'(c)) * (real'(o) / real'(NO));
    occ_rate = 0.0;
    // V buffers; the summed occupancy spread as a mean of per-buffer rates
    occ_rate = (real'(occ) / real'(D)) / real'(V);
    m = status * occ_rate;
    if (m > 1.0) m = 1.0;
    return int'($floor(m * real'(1 << CM_FRAC) + 1.0e-9));
  endfunction

  task automatic apply(int o, int c, int occ);
    @(negedge clk);
    out_flits = o; cand_vcs = c; occ_sum = occ;
    #1;
    checks++;
    if (cm_idle != (c == 0)) begin failures++; $display("cm_idle wrong for c=%0d", c); end
    @(negedge clk);
    checks++;
    if (int'(cm) != expected(o, c, occ)) begin
      failures++;
      $display("o=%0d c=%0d occ=%0d: cm=%0d expected=%0d", o, c, occ, cm, expected(o, c, occ));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    out_flits = 0; cand_vcs = 0; occ_sum = 0;
    @(negedge clk);
    checks++;
    if (cm != CM_ONE) begin failures++; $display("reset value %0d", cm); end
    rst_n = 1;
    apply(0, 0, 0);          // idle router: 1.0
    apply(5, 5, V*D);        // every port busy, every buffer full: 1.0
    apply(1, 1, 1);          // (1/1)*(1/5)*(1/75)
    apply(2, 4, 40);
    apply(0, 3, 9);          // candidates but nothing leaves: 0
    apply(5, 15, 75);
    for (int k = 0; k < 500; k++) begin
      int c, o, occ;
      c   = $urandom % (V + 1);
      o   = (c == 0) ? 0 : $urandom % ((c < NO ? c : NO) + 1);
      occ = c + $urandom % (c * (D - 1) + 1);
      apply(o, c, occ);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
