// tb_network_interface: self-checking test of the network interface.
// The testbench plays the router: it buffers what the interface injects in one
// 5-slot queue per VC, drains at most one flit per cycle at random (with
// pauses, so credits run out) and returns a credit for each drained flit.
// The drained flits are fed back into the interface's ejection side, so
// packets on different VCs interleave there. Checks: no VC queue ever
// overflows (credits respected); each packet is head, bodies, tail on one VC
// with the right payload; the first packet's head is on the link from the second clock edge after
// the one that accepts it and its flits follow back to back; every packet comes back
// reassembled with length 5, its tag and no error.
module tb_network_interface;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t my_x = 3, my_y = 4;
  logic pkt_valid, pkt_ready, rx_valid, rx_err;
  coord_t pkt_dst_x, pkt_dst_y, rx_src_x, rx_src_y;
  tag_t pkt_tag, rx_tag;
  logic [7:0] rx_len;
  link_t to_router, from_router;
  credit_t to_router_credit, from_router_credit;
  int checks = 0, failures = 0;
  int cycle = 0;

  network_interface dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- router model ----
  flit_t vcq[NUM_VCS][$];
  logic pause = 0;
  int pkt_flit_idx = 0;
  vc_id_t pkt_vc;
  tag_t sent_tags[$];
  int stalls = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      to_router_credit <= '0;
      from_router <= '0;
    end else begin
      // accept injected flit
      if (to_router.valid) begin
        head_payload_t hp;
        flit_type_e exp_t;
        hp = head_payload_t'(to_router.flit.data);
        vcq[to_router.vc].push_back(to_router.flit);
        checks++;
        if (vcq[to_router.vc].size() > BUF_DEPTH) begin failures++; $display("VC %0d overflow", to_router.vc); end
        exp_t = (pkt_flit_idx == 0) ? FT_HEAD : (pkt_flit_idx == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
        checks++;
        if (to_router.flit.ftype != exp_t || hp.src_x != my_x || hp.src_y != my_y ||
            (pkt_flit_idx != 0 && to_router.vc != pkt_vc)) begin
          failures++; $display("bad flit %0d of packet: type %0d vc %0d", pkt_flit_idx, to_router.flit.ftype, to_router.vc);
        end
        if (pkt_flit_idx == 0) pkt_vc = to_router.vc;
        pkt_flit_idx = (pkt_flit_idx == PKT_LEN - 1) ? 0 : pkt_flit_idx + 1;
      end
      // drain one VC
      to_router_credit <= '0;
      from_router <= '0;
      if (!pause) begin
        int v;
        v = $urandom % NUM_VCS;
        if (vcq[v].size() != 0 && ($urandom % 3 != 0)) begin
          from_router.valid <= 1'b1;
          from_router.vc    <= vc_id_t'(v);
          from_router.flit  <= vcq[v].pop_front();
          to_router_credit  <= '{valid: 1'b1, vc: vc_id_t'(v)};
        end
      end
    end
  end

  // count cycles where the interface had a flit to send but no credit
  always @(posedge clk) if (rst_n && dut.busy && !dut.fire) stalls++;

  // ---- receiver check ----
  int received = 0;
  always @(posedge clk) if (rst_n && rx_valid) begin
    int idx;
    idx = -1;
    foreach (sent_tags[k]) if (sent_tags[k] == rx_tag) idx = k;
    checks++;
    if (idx < 0 || rx_len != PKT_LEN || rx_err || rx_src_x != my_x || rx_src_y != my_y) begin
      failures++; $display("bad rx: tag %0d len %0d err %b", rx_tag, rx_len, rx_err);
    end else sent_tags.delete(idx);
    received++;
  end

  initial begin
    int acc_cycle;
    pkt_valid = 0; pkt_dst_x = 0; pkt_dst_y = 0; pkt_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pause = 1;      // first packet: no draining, full credits, check timing
    @(negedge clk);
    pkt_valid = 1; pkt_dst_x = 6; pkt_dst_y = 0; pkt_tag = 1000;
    sent_tags.push_back(pkt_tag);
    @(posedge clk); acc_cycle = cycle;
    @(negedge clk); pkt_valid = 0;
    for (int k = 0; k < PKT_LEN; k++) begin
      @(negedge clk);
      checks++;
      if (!to_router.valid || (cycle - acc_cycle) != k + 2) begin
        failures++; $display("flit %0d not back to back (cycle %0d)", k, cycle - acc_cycle);
      end
    end
    pause = 0;
    fork
      forever begin
        repeat (60) @(negedge clk);
        pause = ~pause;
      end
    join_none
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      pkt_valid = 1; pkt_dst_x = coord_t'($urandom % 7); pkt_dst_y = coord_t'($urandom % 7);
      pkt_tag = tag_t'(n + 1);
      sent_tags.push_back(pkt_tag);
      do @(posedge clk); while (!pkt_ready);
      @(negedge clk); pkt_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    disable fork;
    pause = 0;
    repeat (500) @(negedge clk);
    checks++;
    if (received != 301 || sent_tags.size() != 0) begin
      failures++; $display("received %0d of 301, %0d missing", received, sent_tags.size());
    end
    checks++;
    if (stalls == 0) begin failures++; $display("credit stall never happened"); end
    $display("credit stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
