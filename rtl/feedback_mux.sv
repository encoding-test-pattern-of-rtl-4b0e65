// Head-of-chain input selector of the decompressor: one 2:1 multiplexer and one
// exclusive-OR gate.
//
// mod1 = 0 selects the seed bit coming from the control unit, so a seed pattern is shifted
// into the scan chain. mod1 = 1 selects the chain's tail output q, so the chain rotates.
// The XOR gate sits in the q path: with mod2 = 1 q is passed unchanged, with mod2 = 0 it is
// inverted. This polarity follows the printed codewords (a compatible successor carries
// mode2 = 1, a backward-compatible one mode2 = 0) and the inverting bubble drawn on the
// gate's output; a sentence elsewhere that calls mod2 = 1 the inverting value was not followed.
// Purely combinational, no timing of its own.
module feedback_mux (
  input  logic mod1,  // 0: seed channel, 1: recirculation channel
  input  logic mod2,  // 1: recirculate q as is, 0: recirculate ~q
  input  logic seed,  // serial seed bit from the control unit
  input  logic q,     // tail of the scan chain
  output logic td     // head of the scan chain
);
  logic q_fb;

  always_comb begin
    q_fb = ~(q ^ mod2);
    td   = mod1 ? q_fb : seed;
  end
endmodule
