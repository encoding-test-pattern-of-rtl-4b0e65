// Boundary scan register of a wrapped core: N_IN cells on the core's functional inputs and
// N_OUT cells on its functional outputs, chained into one serial path
// tdi -> input cell 0 -> ... -> input cell N_IN-1 -> output cell 0 -> ... -> tdo.
//
// In normal mode (mode = 0) pin_in reaches core_in and core_out reaches pin_out unchanged.
// In test mode the input cells apply shifted-in test bits to the core and the output cells
// capture the core's response (shift_dr = 0) and shift it out (shift_dr = 1).
// The default of two input cells and two output cells is the wrapper example with cells 1-4;
// the order of the cells along the path is this design's choice.
// Timing: N_IN + N_OUT clocks with ce = 1, shift_dr = 1 move a full vector through.
module boundary_scan_register #(
  parameter int unsigned N_IN  = 2,  // cells on core inputs (cells 1 and 2 of the example)
  parameter int unsigned N_OUT = 2   // cells on core outputs (cells 3 and 4 of the example)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             mode,
  input  logic             shift_dr,
  input  logic             tdi,
  output logic             tdo,
  input  logic [N_IN-1:0]  pin_in,    // chip input pins
  output logic [N_IN-1:0]  core_in,   // to the core's functional inputs
  input  logic [N_OUT-1:0] core_out,  // from the core's functional outputs
  output logic [N_OUT-1:0] pin_out    // chip output pins
);
  localparam int unsigned N = N_IN + N_OUT;

  logic [N-1:0] ndi, ndo;
  logic [N:0]   link;   // link[i] is the tdi of cell i, link[N] the register's tdo

  assign ndi     = {core_out, pin_in};
  assign core_in = ndo[N_IN-1:0];
  assign pin_out = ndo[N-1:N_IN];
  assign link[0] = tdi;
  assign tdo     = link[N];

  for (genvar i = 0; i < N; i++) begin : g_cell
    boundary_scan_cell u_cell (
      .clk, .rst_n, .ce, .mode, .shift_dr,
      .ndi (ndi[i]),
      .tdi (link[i]),
      .ndo (ndo[i]),
      .tdo (link[i+1])
    );
  end
endmodule
