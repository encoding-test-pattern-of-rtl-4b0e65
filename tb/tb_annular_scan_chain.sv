// Testbench of annular_scan_chain at its default length (40). Phase 1 drives random
// shift / sel / td / func_d for many cycles and compares every flip-flop with a reference
// shift register. Phase 2 closes the ring (td = q) and checks that a pattern rotates one
// place per clock and is back in place after exactly L clocks.
module tb_annular_scan_chain;
  localparam int unsigned L = 40;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         shift = 1'b0, sel = 1'b1, td = 1'b0;
  logic [L-1:0] func_d = '0;
  logic [L-1:0] pattern;
  logic         q;
  logic         ring_on = 1'b0;
  bit   [L-1:0] model = '0;
  int           checks = 0, failures = 0;

  annular_scan_chain dut (.clk, .rst_n, .shift, .sel, .td(ring_on ? q : td), .func_d,
                          .pattern, .q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit [L-1:0] start;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(pattern == '0, "reset clears the chain");
    for (int i = 0; i < 600; i++) begin
      shift  = ($urandom_range(0, 3) != 0);
      sel    = ($urandom_range(0, 4) != 0);
      td     = $urandom_range(0, 1);
      func_d = {$urandom(), $urandom()};
      @(posedge clk);
      if (shift) model = sel ? {model[L-2:0], td} : func_d;
      @(negedge clk);
      check(pattern == model && q == model[L-1],
            $sformatf("step %0d: pattern %h expected %h", i, pattern, model));
    end
    // ring: td fed from q
    ring_on = 1'b1; sel = 1'b1; shift = 1'b1;
    start = model;
    for (int i = 1; i <= L; i++) begin
      @(negedge clk);
      model = {model[L-2:0], model[L-1]};
      check(pattern == model, $sformatf("ring step %0d", i));
    end
    check(pattern == start, "pattern back in place after L rotations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
