// noc_router: five-port wormhole router with virtual channels, congestion-aware
// dynamic XY routing and the router-wide congestion metric.
//
// Structure (as in the published router): every input port has NUM_VCS VC
// buffers (vc_fifo). It also has a route computation unit (route_compute), a VC
// allocator and a switch allocator, both round-robin, and a crossbar. Output
// ports are plain registered links. Flow control between routers is
// credit-based. A congestion_metric unit turns the router's state into the
// metric CM that the four neighbours read to choose their routes.
//
// Life of a packet in this router (pipeline and timing are this design's):
//  cycle t   : the header arrives on in_link and is written into its VC buffer.
//  cycle t+1 : the header is at the buffer head. Its route is computed from the
//              neighbours' current metrics. It requests an output VC in that
//              direction. If it gets none, it retries next cycle, and the route
//              is recomputed from the metrics of that cycle.
//  cycle t+2 : holding an output VC, the flit requests the switch. It needs a
//              credit for that VC. When granted, it is popped, crosses the
//              crossbar and is registered on out_link. A credit for its
//              buffer slot goes back upstream on in_credit.
//  cycle t+3 : the header is on the output link.
// Body and tail flits follow the header's output VC, one per cycle, from
// cycle t+3 on. The tail releases the input VC and the output VC.
//
// Interface: in_link/out_link carry {valid, vc, flit} per port. in_credit
// returns credits to the upstream router of each input port. out_credit
// receives the credits of the downstream router of each output port. nbr_cm is
// the metric of the neighbour on each port (the local entry is unused). cm is
// this router's metric, registered. `events` flags, per cycle, which
// mechanisms acted; it is combinational.
// Ports follow noc_pkg::port_e. North is the row above (y-1); east is the
// column to the right (x+1).
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  coord_t                     my_x,
  input  coord_t                     my_y,
  input  link_t   [NUM_PORTS-1:0]    in_link,
  output credit_t [NUM_PORTS-1:0]    in_credit,
  output link_t   [NUM_PORTS-1:0]    out_link,
  input  credit_t [NUM_PORTS-1:0]    out_credit,
  input  cm_t     [NUM_PORTS-1:0]    nbr_cm,
  output cm_t                        cm,
  output router_events_t             events
);
  localparam int unsigned NIN = NUM_PORTS * NUM_VCS;
  localparam int unsigned CW  = $clog2(DEPTH + 1);
  localparam int unsigned OW  = $clog2(NIN * DEPTH + 1);

  // ---------------- input VC buffers ----------------
  flit_t [NIN-1:0]          head;
  logic  [NIN-1:0]          empty, full, push, pop;
  logic  [NIN-1:0][CW-1:0]  count;

  // per input VC state
  logic   [NIN-1:0] vc_active;
  port_e  [NIN-1:0] vc_oport;
  vc_id_t [NIN-1:0] vc_ovc;

  // per output VC state
  logic [NUM_PORTS-1:0][NUM_VCS-1:0]          ovc_busy;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0][CW-1:0]  credits;

  for (genvar i = 0; i < NIN; i++) begin : g_vc
    localparam int unsigned P = i / NUM_VCS;
    localparam int unsigned V = i % NUM_VCS;
    assign push[i] = in_link[P].valid && (in_link[P].vc == vc_id_t'(V));
    vc_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk       (clk),
      .rst_n     (rst_n),
      .push      (push[i]),
      .push_flit (in_link[P].flit),
      .pop       (pop[i]),
      .head      (head[i]),
      .empty     (empty[i]),
      .full      (full[i]),
      .count     (count[i])
    );
  end

  // ---------------- route computation ----------------
  port_e [NIN-1:0]               rc_port;
  logic  [NIN-1:0][NUM_VCS-1:0]  rc_mask;
  logic  [NIN-1:0]               rc_adapt, rc_y, rc_tie;

  for (genvar i = 0; i < NIN; i++) begin : g_rc
    head_payload_t hp;
    assign hp = head_payload_t'(head[i].data);
    route_compute u_rc (
      .cur_x    (my_x),
      .cur_y    (my_y),
      .dst_x    (hp.dst_x),
      .dst_y    (hp.dst_y),
      .nbr_cm   (nbr_cm),
      .out_port (rc_port[i]),
      .vc_mask  (rc_mask[i]),
      .adaptive (rc_adapt[i]),
      .chose_y  (rc_y[i]),
      .cm_tie   (rc_tie[i])
    );
  end

  // ---------------- VC allocation ----------------
  logic   [NIN-1:0] va_req, va_gnt;
  vc_id_t [NIN-1:0] va_vc;

  assign va_req = ~vc_active & ~empty;

  vc_allocator #(.NIN(NIN)) u_va (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (va_req),
    .req_port (rc_port),
    .req_mask (rc_mask),
    .ovc_busy (ovc_busy),
    .grant    (va_gnt),
    .grant_vc (va_vc)
  );

  // ---------------- switch allocation ----------------
  logic  [NUM_PORTS-1:0][NUM_VCS-1:0] sa_req, sa_gnt, cr_wait;
  port_e [NUM_PORTS-1:0][NUM_VCS-1:0] sa_port;
  logic  [NUM_PORTS-1:0]              xb_valid;
  port_e [NUM_PORTS-1:0]              xb_sel;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        int i;
        logic has_credit;
        i = p * NUM_VCS + v;
        has_credit    = (credits[vc_oport[i]][vc_ovc[i]] != '0);
        sa_req[p][v]  = vc_active[i] && !empty[i] && has_credit;
        cr_wait[p][v] = vc_active[i] && !empty[i] && !has_credit;
        sa_port[p][v] = vc_oport[i];
        pop[i]        = sa_gnt[p][v];
      end
    end
  end

  switch_allocator u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (sa_req),
    .req_port  (sa_port),
    .vc_grant  (sa_gnt),
    .out_valid (xb_valid),
    .out_sel   (xb_sel)
  );

  // ---------------- crossbar ----------------
  link_t   [NUM_PORTS-1:0]         xb_in, xb_out;
  credit_t [NUM_PORTS-1:0]         cr_next;
  logic    [NUM_PORTS-1:0][2:0]    xb_sel_idx;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      xb_in[p]      = '0;
      cr_next[p]    = '0;
      xb_sel_idx[p] = xb_sel[p];
      for (int v = 0; v < NUM_VCS; v++) begin
        if (sa_gnt[p][v]) begin
          xb_in[p].valid = 1'b1;
          xb_in[p].vc    = vc_ovc[p*NUM_VCS+v];
          xb_in[p].flit  = head[p*NUM_VCS+v];
          cr_next[p]     = '{valid: 1'b1, vc: vc_id_t'(v)};
        end
      end
    end
  end

  crossbar #(.N_IN(NUM_PORTS), .N_OUT(NUM_PORTS)) u_xb (
    .in_link   (xb_in),
    .sel_valid (xb_valid),
    .sel       (xb_sel_idx),
    .out_link  (xb_out)
  );

  // ---------------- state update ----------------
  // per output VC this cycle: a flit sent, a credit returned, a VC granted
  logic [NUM_PORTS-1:0][NUM_VCS-1:0] ovc_sent, ovc_back, ovc_grab;

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        ovc_sent[o][v] = xb_out[o].valid && (xb_out[o].vc == vc_id_t'(v));
        ovc_back[o][v] = out_credit[o].valid && (out_credit[o].vc == vc_id_t'(v));
        ovc_grab[o][v] = 1'b0;
        for (int i = 0; i < NIN; i++)
          if (va_gnt[i] && rc_port[i] == port_e'(o) && va_vc[i] == vc_id_t'(v)) ovc_grab[o][v] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_link  <= '0;
      in_credit <= '0;
      vc_active <= '0;
      vc_oport  <= '0;
      vc_ovc    <= '0;
      ovc_busy  <= '0;
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VCS; v++)
          credits[o][v] <= CW'(DEPTH);
    end else begin
      out_link  <= xb_out;
      in_credit <= cr_next;

      // input VCs: acquire on VC grant, release when the tail leaves
      for (int i = 0; i < NIN; i++) begin
        if (va_gnt[i]) begin
          vc_active[i] <= 1'b1;
          vc_oport[i]  <= rc_port[i];
          vc_ovc[i]    <= va_vc[i];
        end else if (pop[i] && head[i].ftype == FT_TAIL) begin
          vc_active[i] <= 1'b0;
        end
      end

      // output VCs: busy from VC grant until the tail is sent; credits
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VCS; v++) begin
          credits[o][v] <= credits[o][v] - CW'(ovc_sent[o][v]) + CW'(ovc_back[o][v]);
          if (ovc_grab[o][v])
            ovc_busy[o][v] <= 1'b1;
          else if (ovc_sent[o][v] && xb_out[o].flit.ftype == FT_TAIL)
            ovc_busy[o][v] <= 1'b0;
        end
      end
    end
  end

  // ---------------- congestion metric ----------------
  logic [$clog2(NUM_PORTS+1)-1:0] out_flits;
  logic [$clog2(NIN+1)-1:0]       cand_vcs;
  logic [OW-1:0]                  occ_sum;
  logic                           cm_idle;

  always_comb begin
    out_flits = '0;
    cand_vcs  = '0;
    occ_sum   = '0;
    for (int o = 0; o < NUM_PORTS; o++) out_flits += $bits(out_flits)'(xb_valid[o]);
    for (int i = 0; i < NIN; i++) begin
      cand_vcs += $bits(cand_vcs)'(!empty[i]);
      occ_sum  += OW'(count[i]);
    end
  end

  congestion_metric #(.NUM_OUT(NUM_PORTS), .V(NIN), .DEPTH(DEPTH)) u_cm (
    .clk       (clk),
    .rst_n     (rst_n),
    .out_flits (out_flits),
    .cand_vcs  (cand_vcs),
    .occ_sum   (occ_sum),
    .cm        (cm),
    .cm_idle   (cm_idle)
  );

  // ---------------- event flags ----------------
  always_comb begin
    events.adaptive     = |(va_gnt & rc_adapt);
    events.chose_y      = |(va_gnt & rc_adapt & rc_y);
    events.cm_tie       = |(va_gnt & rc_adapt & rc_tie);
    events.va_stall     = |(va_req & ~va_gnt);
    events.sa_conflict  = |(sa_req & ~sa_gnt);
    events.credit_stall = |cr_wait;
    events.cm_idle      = cm_idle;
  end

  // The upstream router respects credits: no flit for a full VC buffer.
  credit_respected: assert property (@(posedge clk) disable iff (!rst_n) (push & full) == '0);
  // A VC that holds no output VC must show a header at its head.
  for (genvar i = 0; i < NIN; i++) begin : g_chk
    hdr_at_head: assert property (@(posedge clk) disable iff (!rst_n)
      va_req[i] |-> head[i].ftype == FT_HEAD);
  end

endmodule
