// ht_trojan: the dead-flit hardware Trojan that sits on one input port.
//
// The circuit is always active and watches every flit that enters the input
// port, before the flit is buffered and before route computation and VC
// allocation see it. An attack is triggered per packet with probability p:
// a free-running 16-bit LFSR is compared with P_THRESH = round(p * 65536)
// when the packet's head flit arrives. Two variants exist:
//   HT_HB  the head flit is turned into a body flit (FT 00 -> 01);
//   HT_BH  the packet's first body flit is turned into a head flit
//          (FT 01 -> 00); only packets with a body flit (PL >= 2) qualify.
// Both are a single flipped bit of the 2-bit FT field, and both leave the
// packet stuck in its VC forever ("dead flits"). The Trojan never infects all
// VCs of its port: it stops once NUM_VC-1 of them are infected, so one VC
// always keeps traffic moving. `out_flit` is `in_flit` with the FT field
// possibly flipped (combinational, no added latency). `attack` pulses on each
// modified flit and `infected` shows which VCs hold dead flits; they exist so
// a test can observe the Trojan and drive nothing in the router.
// The trigger, the variants and the N-1 limit follow the document; the LFSR
// as random source and the per-packet arming for HT_BH are this design's
// choices.
module ht_trojan
  import noc_pkg::*;
#(
  parameter ht_mode_e    MODE     = HT_HB,
  parameter int unsigned P_THRESH = 3277,      // p = 0.05
  parameter logic [15:0] SEED     = 16'hACE1,
  parameter int unsigned NUM_VC   = NUM_VCS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t             in_flit,
  output flit_t             out_flit,
  output logic              attack,
  output logic [NUM_VC-1:0] infected
);
  logic [15:0]       lfsr_q;
  logic [NUM_VC-1:0] infected_q, armed_q;
  logic              trig, budget_ok, fresh_vc;
  head_t             h;
  logic [VCID_W-1:0] v;

  assign h         = head_t'(in_flit.data);
  assign v         = in_flit.vcid;
  assign trig      = ({1'b0, lfsr_q} < 17'(P_THRESH));
  assign budget_ok = ($countones(infected_q | armed_q) < NUM_VC - 1);
  assign fresh_vc  = !infected_q[v] && !armed_q[v];

  logic hit_hb, arm_bh, hit_bh;
  always_comb begin
    hit_hb = 1'b0;
    arm_bh = 1'b0;
    hit_bh = 1'b0;
    if (in_flit.valid) begin
      if (MODE == HT_HB)
        hit_hb = (in_flit.ft == FT_HEAD) && trig && budget_ok && fresh_vc;
      if (MODE == HT_BH) begin
        arm_bh = (in_flit.ft == FT_HEAD) && (h.pl >= 4'd2) && trig && budget_ok && fresh_vc;
        hit_bh = (in_flit.ft == FT_BODY) && armed_q[v];
      end
    end
  end

  always_comb begin
    out_flit = in_flit;
    if (hit_hb || hit_bh) out_flit.ft = ft_e'({in_flit.ft[1], ~in_flit.ft[0]});
  end

  assign attack   = hit_hb || hit_bh;
  assign infected = infected_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q     <= SEED;
      infected_q <= '0;
      armed_q    <= '0;
    end else begin
      // Galois LFSR, x^16 + x^14 + x^13 + x^11 + 1 (maximal length).
      lfsr_q <= {1'b0, lfsr_q[15:1]} ^ (lfsr_q[0] ? 16'hB400 : 16'h0000);
      if (hit_hb || hit_bh) infected_q[v] <= 1'b1;
      if (arm_bh)           armed_q[v]    <= 1'b1;
      if (hit_bh)           armed_q[v]    <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $countones(infected_q) <= NUM_VC - 1);
endmodule
