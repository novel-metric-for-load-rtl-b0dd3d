// tb_noc_mesh: end-to-end test of the whole 7x7 network at its default sizes.
//
// Every node has a packet source: each cycle it creates a packet with
// probability PIR (packets injected per node per cycle) and queues it until
// its network interface accepts it. Two traffic patterns are run, as in the
// published evaluation. Random: every other node is an equally likely
// destination. "Uniform": node (row i, column j) sends to (2i, 2j), taken
// modulo 7 here so that it stays inside the mesh; a node that maps onto itself
// sends nothing. The phases are random at PIR 0.3, uniform at PIR 0.5 and
// random at PIR 1.0, and then the network drains.
//
// Checks: every packet arrives exactly once, at its destination node, with the
// right source, all 5 flits and no reassembly error. Average latency
// (creation to delivery) and throughput (received flits / nodes / cycles) are
// reported. Each mechanism of the routers must occur at least once: adaptive
// choices in X and in Y, metric ties, VC-allocation stalls, switch conflicts,
// credit stalls, the idle metric of 1.0 and a metric below 1.0.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int NX = MESH_X, NY = MESH_Y, N = NX * NY;

  logic clk = 0, rst_n = 0;
  logic           [N-1:0] inj_valid, inj_ready, rx_valid, rx_err;
  coord_t         [N-1:0] inj_dst_x, inj_dst_y, rx_src_x, rx_src_y;
  tag_t           [N-1:0] inj_tag, rx_tag;
  logic [N-1:0][7:0]      rx_len;
  cm_t            [N-1:0] node_cm;
  router_events_t [N-1:0] node_events;
  int checks = 0, failures = 0, cycle = 0;

  noc_mesh dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets outstanding", outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- packet bookkeeping ----------------
  typedef struct { int src; int dst; int born; } pkt_info_t;
  pkt_info_t info [int];
  int q [N][$];              // per-node source queue of packet ids
  int next_id = 1;
  int outstanding = 0, delivered = 0, rx_flits = 0;
  longint lat_sum = 0;
  real pir = 0.0;
  int  pattern = 0;          // 0 random, 1 uniform (2i, 2j)
  logic gen_on = 0;

  // source: packet generation and handshake with the interface
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (inj_valid[n] && inj_ready[n]) void'(q[n].pop_front());
      if (gen_on && ($urandom % 1000) < int'(pir * 1000.0)) begin
        int d;
        if (pattern == 0) begin
          d = $urandom % (N - 1);
          if (d >= n) d++;
        end else begin
          int i, j;
          i = n / NX; j = n % NX;
          d = ((2 * i) % NY) * NX + ((2 * j) % NX);
        end
        if (d != n) begin
          info[next_id] = '{src: n, dst: d, born: cycle};
          q[n].push_back(next_id);
          next_id++;
          outstanding++;
        end
      end
    end
  end

  always_comb begin
    for (int n = 0; n < N; n++) begin
      inj_valid[n] = 1'b0; inj_dst_x[n] = '0; inj_dst_y[n] = '0; inj_tag[n] = '0;
      if (q[n].size() != 0) begin
        inj_valid[n] = 1'b1;
        inj_tag[n]   = tag_t'(q[n][0]);
        inj_dst_x[n] = coord_t'(info[q[n][0]].dst % NX);
        inj_dst_y[n] = coord_t'(info[q[n][0]].dst / NX);
      end
    end
  end

  // sink: delivery check
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) if (rx_valid[n]) begin
      int id;
      id = int'(rx_tag[n]);
      checks++;
      if (!info.exists(id)) begin
        failures++; $display("node %0d: unknown or duplicate packet %0d", n, id);
      end else begin
        if (info[id].dst != n || info[id].src != int'(rx_src_y[n]) * NX + int'(rx_src_x[n]) ||
            rx_len[n] != PKT_LEN || rx_err[n]) begin
          failures++;
          $display("node %0d: packet %0d from %0d to %0d, len %0d err %b", n, id, info[id].src,
                   info[id].dst, rx_len[n], rx_err[n]);
        end
        lat_sum += cycle - info[id].born;
        info.delete(id);
      end
      delivered++;
      outstanding--;
      rx_flits += int'(rx_len[n]);
    end
  end

  // ---------------- mechanism counters ----------------
  int n_adapt = 0, n_y = 0, n_tie = 0, n_vast = 0, n_sac = 0, n_crs = 0, n_idle = 0, n_low = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      n_adapt += node_events[n].adaptive;
      n_y     += node_events[n].chose_y;
      n_tie   += node_events[n].cm_tie;
      n_vast  += node_events[n].va_stall;
      n_sac   += node_events[n].sa_conflict;
      n_crs   += node_events[n].credit_stall;
      n_idle  += node_events[n].cm_idle;
      if (node_cm[n] < CM_ONE) n_low++;
    end
  end

  task automatic phase(string name, int pat, real rate, int cycles);
    int d0, f0, c0;
    longint l0;
    d0 = delivered; f0 = rx_flits; c0 = cycle; l0 = lat_sum;
    pattern = pat; pir = rate; gen_on = 1;
    repeat (cycles) @(negedge clk);
    gen_on = 0;
    $display("%s PIR=%0.1f: created so far %0d, delivered in phase %0d, throughput %0.3f flits/node/cycle",
             name, rate, next_id - 1, delivered - d0,
             real'(rx_flits - f0) / real'(N) / real'(cycle - c0));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase("random ", 0, 0.3, 300);
    phase("uniform", 1, 0.5, 300);
    phase("random ", 0, 1.0, 200);
    while (outstanding != 0) @(negedge clk);
    repeat (20) @(negedge clk);
    $display("all %0d packets delivered by cycle %0d, average latency %0.1f cycles",
             delivered, cycle, real'(lat_sum) / real'(delivered));
    $display("adaptive=%0d chose_y=%0d tie=%0d va_stall=%0d sa_conflict=%0d credit_stall=%0d cm_idle=%0d cm<1=%0d",
             n_adapt, n_y, n_tie, n_vast, n_sac, n_crs, n_idle, n_low);
    checks++;
    if (info.size() != 0) begin failures++; $display("%0d packets never arrived", info.size()); end
    checks++;
    if (n_adapt == 0 || n_y == 0 || n_y == n_adapt || n_tie == 0 || n_vast == 0 || n_sac == 0 ||
        n_crs == 0 || n_idle == 0 || n_low == 0) begin
      failures++; $display("a mechanism never happened");
    end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (node_cm[n] != CM_ONE) begin failures++; $display("node %0d metric %0d when idle", n, node_cm[n]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
