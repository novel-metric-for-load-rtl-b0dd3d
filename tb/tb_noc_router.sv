// tb_noc_router: self-checking test of one router, placed at (3,3) of a 7x7 mesh.
// The testbench is the four neighbours and the local interface. Upstream it
// injects packets on all five inputs, obeying the credits that the router
// returns. Downstream it buffers what comes out, one 5-slot queue per output
// VC, drains those queues at random with pauses, and returns credits.
// Checks:
//  * a lone header crosses the router in 3 cycles and its packet streams out
//    back to back, one flit per cycle;
//  * every packet leaves on the port given by the routing rules for the
//    neighbour metrics of that phase (lower metric wins, X on a tie), on a VC
//    of the right class, as head/body/tail on one output VC, never interleaved
//    with another packet on that VC;
//  * no downstream VC queue ever overflows, so credits are respected;
//  * every packet comes out exactly once;
//  * the metric is 1.0 whenever the router is empty, and goes below 1.0 under load.
// It also checks that adaptive choices of both kinds, VC-allocation stalls,
// switch conflicts and credit stalls all happen.
module tb_noc_router;
  import noc_pkg::*;
  localparam coord_t MX = 3, MY = 3;
  logic clk = 0, rst_n = 0;
  link_t   [NUM_PORTS-1:0] in_link, out_link;
  credit_t [NUM_PORTS-1:0] in_credit, out_credit;
  cm_t     [NUM_PORTS-1:0] nbr_cm;
  cm_t cm;
  router_events_t events;
  int checks = 0, failures = 0, cycle = 0;

  noc_router dut (.clk, .rst_n, .my_x(MX), .my_y(MY), .in_link, .in_credit, .out_link,
                  .out_credit, .nbr_cm, .cm, .events);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- upstream credit tracking ----------------
  int up_sent [NUM_PORTS][NUM_VCS];
  int up_back [NUM_PORTS][NUM_VCS];
  always @(posedge clk)
    if (rst_n) for (int p = 0; p < NUM_PORTS; p++)
      if (in_credit[p].valid) up_back[p][in_credit[p].vc]++;

  function automatic int up_credit(int p, int v);
    return BUF_DEPTH - up_sent[p][v] + up_back[p][v];
  endfunction

  // expected destination of each tag
  coord_t exp_dx [int];
  coord_t exp_dy [int];
  int delivered = 0, injected = 0;

  function automatic port_e route_of(coord_t dx, coord_t dy);
    port_e xp, yp;
    xp = (dx > MX) ? P_EAST : P_WEST;
    yp = (dy < MY) ? P_NORTH : P_SOUTH;
    if (dx == MX && dy == MY) return P_LOCAL;
    if (dx == MX) return yp;
    if (dy == MY) return xp;
    return (nbr_cm[yp] < nbr_cm[xp]) ? yp : xp;
  endfunction

  task automatic send_packet(int p, int v, int tag, coord_t dx, coord_t dy, int gap_max);
    head_payload_t hp;
    hp = '{dst_x: dx, dst_y: dy, src_x: 0, src_y: 0, tag: tag_t'(tag)};
    exp_dx[tag] = dx; exp_dy[tag] = dy;
    injected++;
    for (int k = 0; k < PKT_LEN; k++) begin
      while (up_credit(p, v) == 0) @(negedge clk);
      in_link[p].valid = 1'b1;
      in_link[p].vc = vc_id_t'(v);
      in_link[p].flit.ftype = (k == 0) ? FT_HEAD : (k == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
      in_link[p].flit.data = hp;
      up_sent[p][v]++;
      @(negedge clk);
      in_link[p] = '0;
      if (gap_max > 0) repeat ($urandom % (gap_max + 1)) @(negedge clk);
    end
  endtask

  // ---------------- downstream model ----------------
  flit_t dq [NUM_PORTS][NUM_VCS][$];
  int    open_tag [NUM_PORTS][NUM_VCS];
  logic  drain_pause = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        out_credit[o] <= '0;
        if (out_link[o].valid) begin
          head_payload_t hp;
          int v, tag;
          v  = out_link[o].vc;
          hp = head_payload_t'(out_link[o].flit.data);
          tag = int'(hp.tag);
          dq[o][v].push_back(out_link[o].flit);
          checks++;
          if (dq[o][v].size() > BUF_DEPTH) begin failures++; $display("overflow at output %0d vc %0d", o, v); end
          if (out_link[o].flit.ftype == FT_HEAD) begin
            logic [NUM_VCS-1:0] cls;
            checks++;
            if (open_tag[o][v] != -1) begin failures++; $display("head inside open packet"); end
            open_tag[o][v] = tag;
            checks++;
            if (!exp_dx.exists(tag) || route_of(exp_dx[tag], exp_dy[tag]) != port_e'(o)) begin
              failures++; $display("tag %0d left on port %0d", tag, o);
            end
            cls = 3'b111;
            if ((o == P_NORTH || o == P_SOUTH) && exp_dx.exists(tag)) begin
              if (exp_dx[tag] > MX) cls = 3'b001; else if (exp_dx[tag] < MX) cls = 3'b010; else cls = 3'b100;
            end
            checks++;
            if (!cls[v]) begin failures++; $display("tag %0d on wrong VC class %0d", tag, v); end
          end else begin
            checks++;
            if (open_tag[o][v] != tag) begin failures++; $display("flit of tag %0d in packet %0d", tag, open_tag[o][v]); end
            if (out_link[o].flit.ftype == FT_TAIL) begin
              open_tag[o][v] = -1;
              delivered++;
              exp_dx.delete(tag);
              exp_dy.delete(tag);
            end
          end
        end
        // drain
        if ((!drain_pause || o == P_LOCAL) && ($urandom % 4 != 0)) begin
          int v;
          v = $urandom % NUM_VCS;
          if (dq[o][v].size() != 0) begin
            void'(dq[o][v].pop_front());
            out_credit[o] <= '{valid: 1'b1, vc: vc_id_t'(v)};
          end
        end
      end
    end else out_credit <= '0;
  end

  // ---------------- event counters ----------------
  int n_adapt = 0, n_y = 0, n_tie = 0, n_vast = 0, n_sac = 0, n_crs = 0, n_cmlow = 0;
  always @(posedge clk) if (rst_n) begin
    n_adapt += events.adaptive;
    n_y     += events.chose_y;
    n_tie   += events.cm_tie;
    n_vast  += events.va_stall;
    n_sac   += events.sa_conflict;
    n_crs   += events.credit_stall;
    if (cm < CM_ONE) n_cmlow++;
  end

  task automatic wait_idle();
    int quiet;
    quiet = 0;
    while (delivered != injected) @(negedge clk);
    while (quiet < 20) begin
      @(negedge clk);
      if (out_link == '0 && in_link == '0) quiet++; else quiet = 0;
    end
  endtask

  task automatic random_phase(int npk, int gap);
    fork
      for (int p = 0; p < NUM_PORTS; p++) begin
        automatic int pp = p;
        fork
          for (int n = 0; n < npk; n++)
            send_packet(pp, $urandom % NUM_VCS, 100000 + injected * 8 + pp,
                        coord_t'($urandom % MESH_X), coord_t'($urandom % MESH_Y), gap);
        join_none
      end
    join_none
    wait fork;
  endtask

  initial begin
    in_link = '0;
    nbr_cm = '0;
    for (int o = 0; o < NUM_PORTS; o++) for (int v = 0; v < NUM_VCS; v++) open_tag[o][v] = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- latency: one packet west -> east, nothing else in the router ----
    checks++;
    if (cm != CM_ONE) begin failures++; $display("idle metric %0d", cm); end
    fork
      send_packet(P_WEST, 0, 1, 6, MY, 0);
      begin
        int t0;
        t0 = cycle;
        repeat (3) @(negedge clk);
        for (int k = 0; k < PKT_LEN; k++) begin
          checks++;
          if (!out_link[P_EAST].valid) begin
            failures++; $display("flit %0d not out at cycle %0d", k, cycle - t0);
          end
          @(negedge clk);
        end
      end
    join
    wait_idle();
    checks++;
    if (cm != CM_ONE) begin failures++; $display("metric after drain %0d", cm); end

    // ---- random traffic under three metric settings ----
    nbr_cm[P_NORTH] = 9'd40;  nbr_cm[P_SOUTH] = 9'd200;
    nbr_cm[P_EAST]  = 9'd100; nbr_cm[P_WEST]  = 9'd10;
    random_phase(60, 2);
    wait_idle();
    nbr_cm[P_NORTH] = 9'd90;  nbr_cm[P_SOUTH] = 9'd90;
    nbr_cm[P_EAST]  = 9'd90;  nbr_cm[P_WEST]  = 9'd90;
    random_phase(60, 0);
    wait_idle();
    nbr_cm[P_NORTH] = 9'd256; nbr_cm[P_SOUTH] = 9'd3;
    nbr_cm[P_EAST]  = 9'd0;   nbr_cm[P_WEST]  = 9'd255;
    drain_pause = 1;
    fork
      begin repeat (400) @(negedge clk); drain_pause = 0; end
      random_phase(60, 0);
    join
    drain_pause = 0;
    wait_idle();
    checks++;
    if (cm != CM_ONE) begin failures++; $display("metric after drain %0d", cm); end

    checks++;
    if (delivered != injected || exp_dx.size() != 0) begin
      failures++; $display("delivered %0d of %0d", delivered, injected);
    end
    $display("adaptive=%0d chose_y=%0d tie=%0d va_stall=%0d sa_conflict=%0d credit_stall=%0d cm<1=%0d",
             n_adapt, n_y, n_tie, n_vast, n_sac, n_crs, n_cmlow);
    checks++;
    if (n_adapt == 0 || n_y == 0 || n_y == n_adapt || n_tie == 0 || n_vast == 0 ||
        n_sac == 0 || n_crs == 0 || n_cmlow == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
