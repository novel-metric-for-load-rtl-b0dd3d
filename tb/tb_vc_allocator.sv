// tb_vc_allocator: self-checking test of the VC allocator.
// Random requests, VC masks and busy output VCs. Each cycle it checks that:
// only eligible requesters are granted (their output has a free VC in their
// mask); the granted VC is the lowest free one in the mask; each output port
// grants at most one VC; an output with an eligible requester does grant.
// A directed part checks round-robin alternation between two permanent
// requesters of one output.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int NIN = NUM_PORTS*NUM_VCS;
  logic clk = 0, rst_n = 0;
  logic  [NIN-1:0] req, grant;
  port_e [NIN-1:0] req_port;
  logic  [NIN-1:0][NUM_VCS-1:0] req_mask;
  logic  [NUM_PORTS-1:0][NUM_VCS-1:0] ovc_busy;
  vc_id_t [NIN-1:0] grant_vc;
  int checks = 0, failures = 0;

  vc_allocator dut (.clk, .rst_n, .req, .req_port, .req_mask, .ovc_busy, .grant, .grant_vc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_port = '0; req_mask = '0; ovc_busy = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NIN; i++) begin
        req[i] = ($urandom % 3) == 0;
        req_port[i] = port_e'($urandom % NUM_PORTS);
        req_mask[i] = ($urandom % 2) ? 3'b111 : NUM_VCS'(1 << ($urandom % NUM_VCS));
      end
      for (int o = 0; o < NUM_PORTS; o++) ovc_busy[o] = NUM_VCS'($urandom);
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        int ng, nelig;
        ng = 0; nelig = 0;
        for (int i = 0; i < NIN; i++) begin
          logic [NUM_VCS-1:0] av;
          av = req_mask[i] & ~ovc_busy[o];
          if (req[i] && req_port[i] == port_e'(o) && av != 0) nelig++;
          if (grant[i] && req_port[i] == port_e'(o)) begin
            int lowest;
            ng++;
            lowest = -1;
            for (int v = NUM_VCS - 1; v >= 0; v--) if (av[v]) lowest = v;
            checks++;
            if (!req[i] || av == 0 || int'(grant_vc[i]) != lowest) begin
              failures++;
              $display("cycle %0d: bad grant to %0d vc=%0d lowest=%0d", c, i, grant_vc[i], lowest);
            end
          end
        end
        checks++;
        if (ng != (nelig > 0 ? 1 : 0)) begin
          failures++;
          $display("cycle %0d port %0d: %0d grants, %0d eligible", c, o, ng, nelig);
        end
      end
    end
    // round robin: inputs 2 and 7 both want port EAST forever
    @(negedge clk);
    req = '0; ovc_busy = '0;
    req[2] = 1; req[7] = 1; req_port[2] = P_EAST; req_port[7] = P_EAST;
    req_mask[2] = 3'b111; req_mask[7] = 3'b111;
    begin
      int last, cur;
      last = -1;
      for (int c = 0; c < 8; c++) begin
        #1;
        cur = grant[2] ? 2 : grant[7] ? 7 : -1;
        checks++;
        if (cur == -1 || cur == last) begin failures++; $display("no alternation %0d %0d", cur, last); end
        last = cur;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
