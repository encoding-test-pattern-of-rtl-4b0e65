// Test-data decompressor built around an annular scan chain, with a core's boundary scan
// register beside it.
//
// Decompressor: the control unit reads the compressed stream from bit_in. For a seed
// codeword it selects the seed channel of the head multiplexer and the L seed bits are
// shifted into the scan chain. For a successor codeword it selects the recirculation
// channel and lets the chain rotate n positions, the tail output Q re-entering the head
// through the XOR gate (inverted when mode2 = 0). The chain therefore turns each pattern
// into the next one in n clocks instead of L. pattern (the flip-flop outputs) drives the
// logic under test, which is outside this design: its response enters on func_d and is
// captured into the chain when capture = 1; capture also pauses the control unit.
// pattern_valid marks the first cycle in which a newly generated pattern is in the chain.
//
// Boundary scan register: an independent wrapper path (bsr_*) with cells on N_IN core
// inputs and N_OUT core outputs; no connection between it and the decompressor is given,
// so its ports are brought out on their own.
//
// The decompressor's structure (control unit, one MUX, one XOR gate, ring-connected chain)
// follows the method; routing the logic under test through ports, letting capture pause
// the control unit, and placing the boundary register beside the decompressor are this
// design's choices.
// Timing: seed codeword 1 + L cycles, successor 2 + ENC_W + n cycles, capture one cycle.
module annular_decompressor_top #(
  parameter int unsigned L     = annular_pkg::L_DEFAULT,      // scan chain / pattern length
  parameter int unsigned ENC_W = annular_pkg::ENC_W_DEFAULT,  // shift-count field width
  parameter int unsigned N_IN  = 2,                           // boundary cells on core inputs
  parameter int unsigned N_OUT = 2                            // boundary cells on core outputs
) (
  input  logic             clk,
  input  logic             rst_n,          // synchronous, active low
  // compressed stream from the tester
  input  logic             bit_in,
  output logic             en,             // bit_in consumed this cycle
  // scan chain and logic under test
  output logic [L-1:0]     pattern,        // test pattern applied to the logic under test
  output logic             scan_out,       // tail of the chain (Q)
  output logic             pattern_valid,
  output logic             pattern_seeded,
  input  logic             capture,        // capture func_d into the chain, pauses decoding
  input  logic [L-1:0]     func_d,         // response of the logic under test
  // boundary scan register
  input  logic             bsr_ce,
  input  logic             bsr_mode,
  input  logic             bsr_shift_dr,
  input  logic             bsr_tdi,
  output logic             bsr_tdo,
  input  logic [N_IN-1:0]  bsr_pin_in,
  output logic [N_IN-1:0]  bsr_core_in,
  input  logic [N_OUT-1:0] bsr_core_out,
  output logic [N_OUT-1:0] bsr_pin_out
);
  logic mod1, mod2, seed, shift, td, q;

  control_unit #(.L(L), .ENC_W(ENC_W)) u_cu (
    .clk, .rst_n, .bit_in,
    .hold           (capture),
    .en,
    .mod1, .mod2, .seed, .shift,
    .pattern_valid, .pattern_seeded
  );

  feedback_mux u_mux (
    .mod1, .mod2, .seed, .q, .td
  );

  annular_scan_chain #(.L(L)) u_chain (
    .clk, .rst_n,
    .shift   (shift | capture),
    .sel     (!capture),
    .td,
    .func_d,
    .pattern,
    .q
  );

  assign scan_out = q;

  boundary_scan_register #(.N_IN(N_IN), .N_OUT(N_OUT)) u_bsr (
    .clk, .rst_n,
    .ce       (bsr_ce),
    .mode     (bsr_mode),
    .shift_dr (bsr_shift_dr),
    .tdi      (bsr_tdi),
    .tdo      (bsr_tdo),
    .pin_in   (bsr_pin_in),
    .core_in  (bsr_core_in),
    .core_out (bsr_core_out),
    .pin_out  (bsr_pin_out)
  );
endmodule
