// troika_rc_gen: round-constant generator, an 11-stage ternary LFSR.
//
// The stages s[0..10] hold one-hot trits; the round-constant trit is s[0].
// On step, the register shifts (s[i] <= s[i+1]) and the new s[10] is
// s[RC_TAP] - s[0] mod 3, which has the maximal period 3^11 - 1. load puts
// every stage back to RC_SEED; the core loads it at the start of each
// permutation and steps it once per column (once every third trit) of
// Phase 2, so one permutation consumes 24 x 243 constant trits and every
// permutation sees the same sequence. The document specifies an 11-tap
// ternary LFSR updated once per column but not its feedback or seed; those
// (troika_pkg::RC_TAP, RC_SEED) are this design's own choice. load has
// priority over step. One cycle latency from step to the new rc.
module troika_rc_gen
  import troika_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   step,
  output trit3_t rc
);
  trit3_t s [RC_STAGES];
  trit3_t neg_s0, fb;

  // -s[0]: value v becomes 3-v (0 stays, 1 <-> 2): swap the 1 and 2 wires
  assign neg_s0 = {s[0][1], s[0][2], s[0][0]};
  trit_add u_fb (.a(s[RC_TAP]), .b(neg_s0), .y(fb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '{default: RC_SEED};
    end else if (load) begin
      s <= '{default: RC_SEED};
    end else if (step) begin
      for (int i = 0; i < int'(RC_STAGES) - 1; i++) s[i] <= s[i+1];
      s[RC_STAGES-1] <= fb;
    end
  end

  assign rc = s[0];
endmodule
