// network_interface: connects a processing element to the local port of its
// router.
//
// Injection side: the core offers one packet at a time, as a destination and a
// tag, with a valid/ready handshake. The interface turns it into PKT_LEN flits:
// a head flit, body flits and a tail flit, sent one per cycle. Every flit
// carries the same payload: destination, source and tag (head_payload_t). The
// head picks an input VC of the local router port, round-robin among those with
// a credit. The rest of the packet follows on that VC, and each flit waits for
// a credit. pkt_ready is high while no packet is being sent. With credits
// available, the head flit is registered on to_router at the clock edge after
// the one that accepts the packet, and the other flits follow back to back.
//
// Ejection side: flits from the router's local output are always accepted. A
// credit goes back to the router on the next cycle. Packets are reassembled per
// VC, since packets on different VCs may interleave. On the cycle after a tail
// arrives, rx_valid pulses with the source, the tag and the flit count.
// rx_err is high for a packet whose flits disagree on the tag, or whose first
// flit was not a head.
//
// The splitting of packets into head, body and tail flits follows the
// published design; the handshakes, the flit payload and the VC choice are
// this design's own.
module network_interface
  import noc_pkg::*;
#(
  parameter int unsigned PKT_FLITS = PKT_LEN,
  parameter int unsigned DEPTH     = BUF_DEPTH
) (
  input  logic     clk,
  input  logic     rst_n,
  input  coord_t   my_x,
  input  coord_t   my_y,
  // core, injection
  input  logic     pkt_valid,
  input  coord_t   pkt_dst_x,
  input  coord_t   pkt_dst_y,
  input  tag_t     pkt_tag,
  output logic     pkt_ready,
  // core, ejection
  output logic     rx_valid,
  output coord_t   rx_src_x,
  output coord_t   rx_src_y,
  output tag_t     rx_tag,
  output logic [7:0] rx_len,
  output logic     rx_err,
  // router local port
  output link_t    to_router,
  input  credit_t  to_router_credit,
  input  link_t    from_router,
  output credit_t  from_router_credit
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned FW = $clog2(PKT_FLITS + 1);

  // ---------------- injection ----------------
  logic                         busy;
  head_payload_t                pay;
  logic [FW-1:0]                sent;
  vc_id_t                       cur_vc, rr_vc, pick_vc;
  logic                         pick_ok;
  logic [NUM_VCS-1:0][CW-1:0]   credits;
  logic                         fire;
  vc_id_t                       fire_vc;

  assign pkt_ready = !busy;

  // round-robin pick of a VC with a credit for a new head flit
  always_comb begin
    int unsigned idx;
    pick_ok = 1'b0;
    pick_vc = '0;
    for (int unsigned k = 0; k < NUM_VCS; k++) begin
      idx = int'(rr_vc) + k;
      if (idx >= NUM_VCS) idx = idx - NUM_VCS;
      if (!pick_ok && credits[idx] != '0) begin
        pick_ok = 1'b1;
        pick_vc = vc_id_t'(idx);
      end
    end
    if (sent == '0) begin
      fire    = busy && pick_ok;
      fire_vc = pick_vc;
    end else begin
      fire    = busy && (credits[cur_vc] != '0);
      fire_vc = cur_vc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      pay       <= '0;
      sent      <= '0;
      cur_vc    <= '0;
      rr_vc     <= '0;
      to_router <= '0;
      for (int v = 0; v < NUM_VCS; v++) credits[v] <= CW'(DEPTH);
    end else begin
      to_router <= '0;
      if (!busy && pkt_valid) begin
        busy <= 1'b1;
        sent <= '0;
        pay  <= '{dst_x: pkt_dst_x, dst_y: pkt_dst_y, src_x: my_x, src_y: my_y, tag: pkt_tag};
      end
      if (fire) begin
        to_router.valid <= 1'b1;
        to_router.vc    <= fire_vc;
        to_router.flit.data  <= pay;
        to_router.flit.ftype <= (sent == '0) ? FT_HEAD :
                                (int'(sent) == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
        if (sent == '0) begin
          cur_vc <= pick_vc;
          rr_vc  <= (int'(pick_vc) == NUM_VCS - 1) ? '0 : pick_vc + 1'b1;
        end
        if (int'(sent) == PKT_FLITS - 1) busy <= 1'b0;
        sent <= sent + 1'b1;
      end
      for (int v = 0; v < NUM_VCS; v++) begin
        credits[v] <= credits[v]
                      - CW'(fire && fire_vc == vc_id_t'(v))
                      + CW'(to_router_credit.valid && to_router_credit.vc == vc_id_t'(v));
      end
    end
  end

  // ---------------- ejection ----------------
  head_payload_t                  rx_pay;
  logic [NUM_VCS-1:0]             asm_open;
  logic [NUM_VCS-1:0]             asm_bad;
  tag_t [NUM_VCS-1:0]             asm_tag;
  coord_t [NUM_VCS-1:0]           asm_sx, asm_sy;
  logic [NUM_VCS-1:0][7:0]        asm_len;

  assign rx_pay = head_payload_t'(from_router.flit.data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      from_router_credit <= '0;
      rx_valid <= 1'b0;
      rx_src_x <= '0;
      rx_src_y <= '0;
      rx_tag   <= '0;
      rx_len   <= '0;
      rx_err   <= 1'b0;
      asm_open <= '0;
      asm_bad  <= '0;
      asm_tag  <= '0;
      asm_sx   <= '0;
      asm_sy   <= '0;
      asm_len  <= '0;
    end else begin
      from_router_credit <= '{valid: from_router.valid, vc: from_router.vc};
      rx_valid <= 1'b0;
      if (from_router.valid) begin
        automatic vc_id_t v = from_router.vc;
        if (from_router.flit.ftype == FT_HEAD) begin
          asm_open[v] <= 1'b1;
          asm_bad[v]  <= asm_open[v];   // a head inside an open packet
          asm_tag[v]  <= rx_pay.tag;
          asm_sx[v]   <= rx_pay.src_x;
          asm_sy[v]   <= rx_pay.src_y;
          asm_len[v]  <= 8'd1;
        end else begin
          asm_len[v] <= asm_len[v] + 8'd1;
          if (!asm_open[v] || rx_pay.tag != asm_tag[v]) asm_bad[v] <= 1'b1;
          if (from_router.flit.ftype == FT_TAIL) begin
            asm_open[v] <= 1'b0;
            rx_valid    <= 1'b1;
            rx_src_x    <= asm_sx[v];
            rx_src_y    <= asm_sy[v];
            rx_tag      <= asm_tag[v];
            rx_len      <= asm_len[v] + 8'd1;
            rx_err      <= asm_bad[v] || !asm_open[v] || (rx_pay.tag != asm_tag[v]);
            asm_bad[v]  <= 1'b0;
          end
        end
      end
    end
  end

  // The core keeps an offered packet until it is taken.
  pkt_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (pkt_valid && !pkt_ready) |=> pkt_valid);
  // Never more flits in flight on a local-port VC than it has buffer slots.
  for (genvar v = 0; v < NUM_VCS; v++) begin : g_chk
    credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
      credits[v] <= CW'(DEPTH));
  end

endmodule
