// Exhaustive testbench of feedback_mux: all 16 input combinations. Expected: the seed bit
// when mod1 = 0, otherwise q, inverted when mod2 = 0.
module tb_feedback_mux;
  logic mod1, mod2, seed, q, td;
  int checks = 0, failures = 0;

  feedback_mux dut (.*);

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_td;
      {mod1, mod2, seed, q} = 4'(v);
      #1;
      if (!mod1)     exp_td = seed;
      else if (mod2) exp_td = q;
      else           exp_td = !q;
      checks++;
      if (td != exp_td) begin
        failures++;
        $display("FAIL: mod1=%b mod2=%b seed=%b q=%b td=%b", mod1, mod2, seed, q, td);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
