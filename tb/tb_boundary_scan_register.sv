// Randomised testbench of boundary_scan_register (2 input cells, 2 output cells) against a
// reference register: cells 0..1 sit on the core inputs, 2..3 on the core outputs, and the
// serial path runs tdi -> cell 0 -> ... -> cell 3 -> tdo. A directed part then shifts a
// known vector in and reads a captured vector out.
module tb_boundary_scan_register;
  localparam int unsigned N_IN = 2, N_OUT = 2, N = N_IN + N_OUT;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             ce = 1'b0, mode = 1'b0, shift_dr = 1'b0, tdi = 1'b0;
  logic             tdo;
  logic [N_IN-1:0]  pin_in = '0, core_in;
  logic [N_OUT-1:0] core_out = '0, pin_out;
  bit   [N-1:0]     cells = '0;
  int               checks = 0, failures = 0;

  boundary_scan_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit [N-1:0] got;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      {ce, mode, shift_dr, tdi} = 4'($urandom());
      pin_in   = N_IN'($urandom());
      core_out = N_OUT'($urandom());
      #1;
      check(core_in == (mode ? cells[N_IN-1:0] : pin_in) &&
            pin_out == (mode ? cells[N-1:N_IN] : core_out) && tdo == cells[N-1],
            $sformatf("step %0d", i));
      @(posedge clk);
      if (ce) cells = shift_dr ? {cells[N-2:0], tdi} : {core_out, pin_in};
      @(negedge clk);
    end
    // directed: capture a known vector and shift it out
    ce = 1'b1; mode = 1'b1; shift_dr = 1'b0; pin_in = 2'b10; core_out = 2'b01;
    @(negedge clk);
    shift_dr = 1'b1;
    for (int i = 0; i < N; i++) begin
      got[N-1-i] = tdo;
      @(negedge clk);
    end
    check(got == 4'b0110, $sformatf("captured vector shifted out: %b", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
