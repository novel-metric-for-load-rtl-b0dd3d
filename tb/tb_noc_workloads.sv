// tb_noc_workloads: the traffic sweep of the published evaluation, run on the
// 7x7 network at its default sizes.
//
// For each traffic pattern (random; node (row i, column j) to (2i, 2j) modulo
// 7) and each packet injection rate (PIR 0.3, 0.5, 1.0 packets per node per
// cycle), the network is reset and packets are created for a window of 300,
// 500 or 1000 cycles. The 1000-cycle window is run only for random traffic at
// PIR 1.0. Over the window the testbench measures
//   throughput = flits received / (nodes * window cycles)
//   latency    = mean cycles from packet creation to delivery, for the packets
//                delivered inside the window
// and prints them as a table. It then stops creating packets, lets the network
// drain, and checks that every packet arrived once, intact, at its destination.
// It also checks that each run delivered traffic and made adaptive routing
// decisions.
module tb_noc_workloads;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int src; int dst; int born; } pkt_info_t;
  pkt_info_t info [int];
  int q [N][$];
  int next_id = 1;
  int outstanding = 0;
  int win_flits = 0, win_pkts = 0, n_adapt = 0;
  longint win_lat = 0;
  logic in_window = 0;
  real pir = 0.0;
  int  pattern = 0;
  logic gen_on = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (inj_valid[n] && inj_ready[n]) void'(q[n].pop_front());
      if (gen_on && ($urandom % 1000) < int'(pir * 1000.0)) begin
        int d;
        if (pattern == 0) begin
          d = $urandom % (N - 1);
          if (d >= n) d++;
        end else begin
          d = ((2 * (n / NX)) % NY) * NX + ((2 * (n % NX)) % NX);
        end
        if (d != n) begin
          info[next_id] = '{src: n, dst: d, born: cycle};
          q[n].push_back(next_id);
          next_id = (next_id == (1 << TAG_W) - 1) ? 1 : next_id + 1;
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

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      n_adapt += node_events[n].adaptive;
      if (rx_valid[n]) begin
        int id;
        id = int'(rx_tag[n]);
        checks++;
        if (!info.exists(id) || info[id].dst != n ||
            info[id].src != int'(rx_src_y[n]) * NX + int'(rx_src_x[n]) ||
            rx_len[n] != PKT_LEN || rx_err[n]) begin
          failures++;
          $display("node %0d: bad delivery of packet %0d", n, id);
        end else begin
          if (in_window) begin
            win_flits += int'(rx_len[n]);
            win_pkts++;
            win_lat += cycle - info[id].born;
          end
          info.delete(id);
        end
        outstanding--;
      end
    end
  end

  task automatic run(int pat, real rate, int window);
    int c0, t_drain;
    // reset the network and the bookkeeping
    rst_n = 0;
    for (int n = 0; n < N; n++) q[n].delete();
    info.delete();
    outstanding = 0; win_flits = 0; win_pkts = 0; win_lat = 0; n_adapt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pattern = pat; pir = rate;
    c0 = cycle;
    gen_on = 1; in_window = 1;
    repeat (window) @(negedge clk);
    gen_on = 0; in_window = 0;
    t_drain = cycle;
    while (outstanding != 0 && cycle - t_drain < 100000) @(negedge clk);
    $display("%-7s PIR=%0.1f cycles=%4d | Th=%0.3f  Lat=%7.1f  (Lat/10=%0.2f) | drained after %0d more cycles",
             pat == 0 ? "random" : "uniform", rate, window,
             real'(win_flits) / real'(N * window),
             win_pkts == 0 ? 0.0 : real'(win_lat) / real'(win_pkts),
             win_pkts == 0 ? 0.0 : real'(win_lat) / real'(win_pkts) / 10.0,
             cycle - t_drain);
    checks++;
    if (outstanding != 0 || info.size() != 0) begin
      failures++; $display("  %0d packets not delivered", outstanding);
    end
    checks++;
    if (win_flits == 0 || n_adapt == 0) begin
      failures++; $display("  no traffic or no adaptive decision");
    end
  endtask

  initial begin
    real rates [3] = '{0.3, 0.5, 1.0};
    repeat (2) @(negedge clk);
    for (int w = 0; w < 2; w++)
      for (int pat = 0; pat < 2; pat++)
        for (int r = 0; r < 3; r++)
          run(pat, rates[r], w == 0 ? 300 : 500);
    run(0, 1.0, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
