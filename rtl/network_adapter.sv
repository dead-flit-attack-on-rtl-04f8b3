// network_adapter: the tile's interface to its router (packetizer and
// depacketizer).
//
// Injection: the tile offers a packet descriptor (send_valid/send_ready
// handshake). The adapter accepts it only when one of the router's local
// input VCs is idle, claims that VC, and then sends the head flit followed
// by PL non-head flits, one per cycle while it holds credits: PL = 0 gives
// the document's single-flit miss request, PL = 4 its 5-flit reply
// (H, B, B, B, T). The head carries PID, SID (this tile), DID, PL, TYPE, PR,
// CMD and ADDRESS; body flit k (k = 1..PL) carries data + k - 1, standing in
// for consecutive words of a cache block. Credits and idle VCs of the
// router's local input port are tracked by an output_unit.
// Ejection: flits from the router's local output are reassembled per VC.
// When a packet's last flit arrives, rx_valid pulses for one cycle with the
// head fields, the first payload word and an error flag (wrong flit count,
// payloads not consecutive, or a flit type out of order). Every received flit
// returns a credit to the router in the next cycle; the tile is assumed to
// accept every packet, so ejection never stalls.
// The adapter's role (build packets, hand them to the router) follows the
// document; everything about its interface and payload is this design's.
module network_adapter
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = NUM_VCS,
  parameter int unsigned DEPTH  = VC_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TILE_W-1:0] my_id,
  // tile side
  input  logic              send_valid,
  output logic              send_ready,
  input  pkt_desc_t         send_desc,
  output logic              rx_valid,
  output pkt_rx_t           rx_pkt,
  // router side
  output flit_t             inj_flit,
  input  credit_t           inj_credit,
  input  flit_t             ej_flit,
  output credit_t           ej_credit
);
  // ---------------- injection ----------------
  logic [NUM_VC-1:0] vc_idle, credit_avail;
  logic              busy_q;
  pkt_desc_t         desc_q;
  logic [VCID_W-1:0] vc_q;
  logic [3:0]        k_q;
  logic              any_idle, accept, send_now;
  logic [VCID_W-1:0] free_vc;

  always_comb begin
    any_idle = |vc_idle;
    free_vc  = '0;
    for (int v = NUM_VC - 1; v >= 0; v--)
      if (vc_idle[v]) free_vc = VCID_W'(v);
  end

  assign send_ready = !busy_q && any_idle;
  assign accept     = send_valid && send_ready;
  assign send_now   = busy_q && credit_avail[vc_q];

  output_unit #(.NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_ou (
    .clk(clk), .rst_n(rst_n), .credit_in(inj_credit),
    .alloc_valid(accept), .alloc_vc(free_vc),
    .send_valid(send_now), .send_vc(vc_q),
    .vc_idle(vc_idle), .credit_avail(credit_avail)
  );

  function automatic flit_t make_flit(pkt_desc_t d, logic [3:0] k, logic [VCID_W-1:0] vc,
                                      logic [TILE_W-1:0] sid);
    flit_t f;
    head_t h;
    f.valid = 1'b1;
    f.vcid  = vc;
    if (k == 0) begin
      h.pid   = d.pid;
      h.sid   = sid;
      h.did   = d.did;
      h.pl    = d.pl;
      h.ptype = d.ptype;
      h.pr    = d.pr;
      h.cmd   = d.cmd;
      h.addr  = d.addr;
      f.ft    = FT_HEAD;
      f.data  = FLIT_W'(h);
    end else begin
      f.ft    = (k == d.pl) ? FT_TAIL : FT_BODY;
      f.data  = d.data + FLIT_W'(k - 1);
    end
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      desc_q   <= '0;
      vc_q     <= '0;
      k_q      <= '0;
      inj_flit <= '0;
    end else begin
      inj_flit <= '0;
      if (accept) begin
        busy_q <= 1'b1;
        desc_q <= send_desc;
        vc_q   <= free_vc;
        k_q    <= '0;
      end else if (send_now) begin
        inj_flit <= make_flit(desc_q, k_q, vc_q, my_id);
        k_q      <= k_q + 1'b1;
        if (k_q == desc_q.pl) busy_q <= 1'b0;
      end
    end
  end

  // ---------------- ejection ----------------
  head_t             rx_hdr  [NUM_VC];
  logic [3:0]        rx_cnt  [NUM_VC];
  logic [63:0]       rx_base [NUM_VC];
  logic [63:0]       rx_prev [NUM_VC];
  logic              rx_err  [NUM_VC];
  logic              rx_open [NUM_VC];
  head_t             ej_head;
  logic [VCID_W-1:0] ev;

  assign ej_head = head_t'(ej_flit.data);
  assign ev      = ej_flit.vcid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ej_credit <= '0;
      rx_valid  <= 1'b0;
      rx_pkt    <= '0;
      for (int v = 0; v < NUM_VC; v++) begin
        rx_hdr[v]  <= '0;
        rx_cnt[v]  <= '0;
        rx_base[v] <= '0;
        rx_prev[v] <= '0;
        rx_err[v]  <= 1'b0;
        rx_open[v] <= 1'b0;
      end
    end else begin
      ej_credit <= '0;
      rx_valid  <= 1'b0;
      if (ej_flit.valid) begin
        ej_credit.valid   <= 1'b1;
        ej_credit.vcid    <= ev;
        ej_credit.vc_free <= is_last_flit(ej_flit.ft, ej_flit.data);
        if (ej_flit.ft == FT_HEAD) begin
          rx_hdr[ev]  <= ej_head;
          rx_cnt[ev]  <= '0;
          rx_err[ev]  <= rx_open[ev];
          rx_open[ev] <= (ej_head.pl != 0);
          if (ej_head.pl == 0) begin
            rx_valid     <= 1'b1;
            rx_pkt.pid   <= ej_head.pid;
            rx_pkt.sid   <= ej_head.sid;
            rx_pkt.pl    <= ej_head.pl;
            rx_pkt.ptype <= ej_head.ptype;
            rx_pkt.addr  <= ej_head.addr;
            rx_pkt.data  <= '0;
            rx_pkt.err   <= rx_open[ev];
          end
        end else begin
          logic       bad;
          logic [3:0] n;
          n   = rx_cnt[ev] + 1'b1;
          bad = !rx_open[ev] || ej_flit.ft == FT_UNDEF
                || (rx_cnt[ev] != 0 && ej_flit.data != rx_prev[ev] + 64'd1)
                || (ej_flit.ft == FT_TAIL && n != rx_hdr[ev].pl)
                || (ej_flit.ft == FT_BODY && n >= rx_hdr[ev].pl);
          rx_cnt[ev]  <= n;
          rx_prev[ev] <= ej_flit.data;
          if (rx_cnt[ev] == 0) rx_base[ev] <= ej_flit.data;
          rx_err[ev]  <= rx_err[ev] || bad;
          if (ej_flit.ft == FT_TAIL) begin
            rx_open[ev]  <= 1'b0;
            rx_valid     <= 1'b1;
            rx_pkt.pid   <= rx_hdr[ev].pid;
            rx_pkt.sid   <= rx_hdr[ev].sid;
            rx_pkt.pl    <= rx_hdr[ev].pl;
            rx_pkt.ptype <= rx_hdr[ev].ptype;
            rx_pkt.addr  <= rx_hdr[ev].addr;
            rx_pkt.data  <= (rx_cnt[ev] == 0) ? ej_flit.data : rx_base[ev];
            rx_pkt.err   <= rx_err[ev] || bad;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) accept |-> vc_idle[free_vc]);
endmodule
