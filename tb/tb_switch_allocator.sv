// tb_switch_allocator: self-checking test of the switch allocator.
// Random requests each cycle. It checks that every grant answers a request,
// that each input port gets at most one VC and each output at most one input,
// and that out_sel names the granted input. It also checks that some request
// is always granted, and that every output requested by exactly one input
// port gets that port. A directed part checks that two inputs fighting for one
// output alternate.
module tb_switch_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  [NUM_PORTS-1:0][NUM_VCS-1:0] req, vc_grant;
  port_e [NUM_PORTS-1:0][NUM_VCS-1:0] req_port;
  logic  [NUM_PORTS-1:0] out_valid;
  port_e [NUM_PORTS-1:0] out_sel;
  int checks = 0, failures = 0;

  switch_allocator dut (.clk, .rst_n, .req, .req_port, .vc_grant, .out_valid, .out_sel);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_port = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      int ngr;
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NUM_VCS; v++) begin
          req[p][v] = ($urandom % 3) == 0;
          req_port[p][v] = port_e'($urandom % NUM_PORTS);
        end
      #1;
      ngr = 0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        checks++;
        if (!$onehot0(vc_grant[p]) || ((vc_grant[p] & ~req[p]) != 0)) begin
          failures++; $display("cycle %0d: input %0d grant %b req %b", c, p, vc_grant[p], req[p]);
        end
        for (int v = 0; v < NUM_VCS; v++) if (vc_grant[p][v]) begin
          ngr++;
          checks++;
          if (!out_valid[req_port[p][v]] || out_sel[req_port[p][v]] != port_e'(p)) begin
            failures++; $display("cycle %0d: crossbar select does not match grant", c);
          end
        end
      end
      for (int o = 0; o < NUM_PORTS; o++) if (out_valid[o]) begin
        checks++;
        if ((vc_grant[out_sel[o]] == 0) || req_port[out_sel[o]][$clog2(vc_grant[out_sel[o]])] != port_e'(o)) begin
          failures++; $display("cycle %0d: output %0d valid without matching grant", c, o);
        end
      end
      checks++;
      if ((req != 0) && ngr == 0) begin failures++; $display("cycle %0d: requests but no grant", c); end
      // an output wanted by exactly one input port, whose VCs all want it, must go to that port
      for (int o = 0; o < NUM_PORTS; o++) begin
        int nwant, who;
        logic all_same;
        nwant = 0; who = -1;
        for (int p = 0; p < NUM_PORTS; p++) begin
          logic any;
          any = 0;
          all_same = 1;
          for (int v = 0; v < NUM_VCS; v++) if (req[p][v]) begin
            if (req_port[p][v] == port_e'(o)) any = 1; else all_same = 0;
          end
          if (any) begin nwant++; if (all_same) who = p; else who = -2; end
        end
        if (nwant == 1 && who >= 0) begin
          checks++;
          if (!out_valid[o] || out_sel[o] != port_e'(who)) begin
            failures++; $display("cycle %0d: output %0d not given to sole requester %0d", c, o, who);
          end
        end
      end
    end
    // inputs 1 and 3 both want output LOCAL forever
    @(negedge clk);
    req = '0; req[1][0] = 1; req[3][2] = 1; req_port[1][0] = P_LOCAL; req_port[3][2] = P_LOCAL;
    begin
      port_e last;
      #1 last = out_sel[P_LOCAL];
      for (int c = 0; c < 8; c++) begin
        @(negedge clk); #1;
        checks++;
        if (!out_valid[P_LOCAL] || out_sel[P_LOCAL] == last) begin failures++; $display("no alternation"); end
        last = out_sel[P_LOCAL];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
