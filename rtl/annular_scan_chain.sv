// Annular scan chain: L scan flip-flops, each with a 2:1 multiplexer in front of D.
//
// With sel = 1 (scan) and shift = 1, flip-flop 1 loads the serial input td and flip-flop i
// loads flip-flop i-1, so the content moves one place "clockwise" per clock; the last
// flip-flop's output q is brought out so that it can be routed back to td, which closes
// the ring. With sel = 0 and shift = 1 every flip-flop captures its functional input
// func_d (the response of the logic it feeds). With shift = 0 the chain holds.
// pattern[k] is the output of flip-flop k+1, i.e. bit B(k) of the pattern, and drives the
// logic under test in parallel.
//
// The chain structure, the per-cell multiplexer and the ring closure follow the annular
// scan chain drawing. The clock enable (shift) and the synchronous reset to zero are this
// design's own additions: the control unit must be able to hold the chain while it reads
// a codeword. One clock edge per shift, no latency beyond that.
module annular_scan_chain #(
  parameter int unsigned L = annular_pkg::L_DEFAULT  // number of flip-flops (pattern length)
) (
  input  logic         clk,
  input  logic         rst_n,    // synchronous, active low: clears all flip-flops
  input  logic         shift,    // clock enable of every flip-flop
  input  logic         sel,      // 1: serial path (scan), 0: functional capture
  input  logic         td,       // serial input of flip-flop 1
  input  logic [L-1:0] func_d,   // functional inputs, func_d[k] into flip-flop k+1
  output logic [L-1:0] pattern,  // parallel outputs, pattern[k] = flip-flop k+1
  output logic         q         // output of flip-flop L
);
  logic [L-1:0] ff;
  logic [L-1:0] d;

  always_comb begin
    d = sel ? {ff[L-2:0], td} : func_d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     ff <= '0;
    else if (shift) ff <= d;
  end

  assign pattern = ff;
  assign q       = ff[L-1];

  initial begin
    assert (L >= 2) else $error("annular_scan_chain: L must be at least 2");
  end
endmodule
