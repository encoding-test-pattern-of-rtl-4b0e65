// Randomised testbench of boundary_scan_cell against a one-flip-flop reference: in normal
// mode ndo must equal ndi, in test mode the flip-flop; the flip-flop takes tdi when
// shifting and ndi when capturing, only with ce = 1.
module tb_boundary_scan_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce = 1'b0, mode = 1'b0, shift_dr = 1'b0, ndi = 1'b0, tdi = 1'b0;
  logic ndo, tdo;
  bit   ff = 1'b0;
  int   checks = 0, failures = 0;
  int   n_normal = 0, n_test = 0;

  boundary_scan_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      {ce, mode, shift_dr, ndi, tdi} = 5'($urandom());
      #1;
      checks++;
      if (ndo != (mode ? ff : ndi) || tdo != ff) begin
        failures++;
        $display("FAIL: step %0d mode=%b ndi=%b ff=%b ndo=%b tdo=%b", i, mode, ndi, ff, ndo, tdo);
      end
      if (mode) n_test++; else n_normal++;
      @(posedge clk);
      if (ce) ff = shift_dr ? tdi : ndi;
      @(negedge clk);
    end
    checks++;
    if (n_normal == 0 || n_test == 0) failures++;
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
