// tb_crossbar: self-checking test of the crossbar.
// Random input links and random selections (including an out-of-range one);
// each output must equal the selected input, marked valid, or be empty when
// not selected.
module tb_crossbar;
  import noc_pkg::*;
  link_t [NUM_PORTS-1:0] in_link, out_link;
  logic  [NUM_PORTS-1:0] sel_valid;
  logic  [NUM_PORTS-1:0][2:0] sel;
  int checks = 0, failures = 0;

  crossbar dut (.in_link, .sel_valid, .sel, .out_link);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2000; c++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_link[p] = link_t'({$urandom, $urandom});
        sel[p] = 3'($urandom % 6);
        sel_valid[p] = $urandom % 2;
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        link_t e;
        e = '0;
        if (sel_valid[o] && sel[o] < NUM_PORTS) begin
          e = in_link[sel[o]];
          e.valid = 1'b1;
        end
        checks++;
        if (out_link[o] != e) begin failures++; $display("output %0d mismatch", o); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
