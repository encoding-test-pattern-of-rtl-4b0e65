// Boundary scan cell: one pin of a wrapped core.
//
// In normal mode (mode = 0) the functional signal passes straight through from ndi to ndo.
// In boundary test mode (mode = 1) ndo is driven by the cell's flip-flop instead. The
// flip-flop either captures ndi (shift_dr = 0) or takes the serial test data from tdi
// (shift_dr = 1) on a clock with ce = 1; tdo is its output and feeds the next cell, so that
// chained cells form a scan path from the chip's TDI to its TDO.
//
// Only the behaviour (pass-through in normal mode, serial shift in test mode) is given; a
// single capture/shift flip-flop is the simplest cell that shows it, so there is no
// separate update stage and ndo follows the shifting data while in test mode.
// Timing: one flip-flop, so one clock per shift position; ndo is combinational in mode.
module boundary_scan_cell (
  input  logic clk,
  input  logic rst_n,     // synchronous, active low
  input  logic ce,        // clock enable of the cell flip-flop
  input  logic mode,      // 0: normal (ndi -> ndo), 1: boundary test
  input  logic shift_dr,  // 1: shift tdi in, 0: capture ndi
  input  logic ndi,       // functional input
  input  logic tdi,       // serial test data in
  output logic ndo,       // functional output
  output logic tdo        // serial test data out
);
  logic ff;

  always_ff @(posedge clk) begin
    if (!rst_n)  ff <= 1'b0;
    else if (ce) ff <= shift_dr ? tdi : ndi;
  end

  assign ndo = mode ? ff : ndi;
  assign tdo = ff;
endmodule
