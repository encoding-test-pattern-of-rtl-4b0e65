// Workload testbench at the scan lengths of six ISCAS'89 benchmark circuits (s5378, s9234,
// s13207, s15850, s38417, s38584). The lengths are the usual full-scan test-cube widths
// (primary inputs plus flip-flops) of these circuits, and the count field is log2 of the
// length rounded up. The cubes are synthetic (see workload_runner): the real test sets
// are not part of this design. Each runner encodes, decodes and checks 100 cubes.
module tb_workload_iscas_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 6;
  logic [NW-1:0] done;
  int            c[NW], f[NW];

  workload_runner #(.L(214),  .ENC_W(8),  .NAME("s5378"))  w0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  workload_runner #(.L(247),  .ENC_W(8),  .NAME("s9234"))  w1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  workload_runner #(.L(700),  .ENC_W(10), .NAME("s13207")) w2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  workload_runner #(.L(611),  .ENC_W(10), .NAME("s15850")) w3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));
  workload_runner #(.L(1664), .ENC_W(11), .NAME("s38417")) w4 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]));
  workload_runner #(.L(1464), .ENC_W(11), .NAME("s38584")) w5 (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]));

  int checks, failures;

  task automatic report(input int extra);
    checks = 0; failures = extra;
    for (int i = 0; i < NW; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    wait (&done);
    @(negedge clk);
    report(0);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    report(1);
    $finish;
  end
endmodule
