// Cycle-accurate testbench of control_unit at its defaults (L = 40, 4-bit counts).
//
// Random codewords (seeds and successors with random polarity and shift count, including
// zero) are turned into an expected per-cycle schedule: a seed takes one mode cycle and L
// cycles in which en = 1, shift = 1, mod1 = 0 and seed = bit_in; a successor takes 2 + ENC_W
// stream cycles (en = 1, shift = 0) and then n rotation cycles (en = 0, shift = 1, mod1 = 1,
// mod2 = the codeword's polarity). hold is raised at random and must freeze the schedule.
// pattern_valid must follow the last cycle of every codeword, with pattern_seeded telling
// seed from successor.
module tb_control_unit;
  localparam int unsigned L = 40, ENC_W = 4, NCW = 60;

  typedef struct packed {
    bit en, shift, mod1, m2, b, last, is_seed;
  } step_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_in = 1'b0, hold = 1'b0;
  logic en, mod1, mod2, seed, shift, pattern_valid, pattern_seeded;

  control_unit dut (.*);

  always #5 clk = ~clk;

  step_t sched[$];
  int    checks = 0, failures = 0;
  int    n_seed = 0, n_succ = 0, n_hold = 0, n_rot = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic step_t mk(bit e, bit s, bit m1, bit m2, bit b, bit last, bit is_seed);
    step_t t;
    t.en = e; t.shift = s; t.mod1 = m1; t.m2 = m2; t.b = b; t.last = last; t.is_seed = is_seed;
    return t;
  endfunction

  initial begin
    int unsigned pos = 0;
    bit          valid_next = 1'b0, seeded_next = 1'b0;

    for (int c = 0; c < NCW; c++) begin
      if (c == 0 || $urandom_range(0, 4) == 0) begin
        sched.push_back(mk(1, 0, 1, 0, 0, 0, 1));
        for (int k = 0; k < L; k++)
          sched.push_back(mk(1, 1, 0, 0, $urandom_range(0, 1), k == L - 1, 1));
      end else begin
        bit             m2;
        bit [ENC_W-1:0] n;
        m2 = 1'($urandom_range(0, 1));
        n  = ENC_W'($urandom_range(0, (1 << ENC_W) - 1));
        sched.push_back(mk(1, 0, 1, 0, 1, 0, 0));
        sched.push_back(mk(1, 0, 1, 0, m2, 0, 0));
        for (int b = ENC_W - 1; b >= 0; b--)
          sched.push_back(mk(1, 0, 1, 0, n[b], (b == 0) && (n == 0), 0));
        for (int s = 0; s < int'(n); s++)
          sched.push_back(mk(0, 1, 1, m2, 0, s == int'(n) - 1, 0));
      end
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (pos < sched.size()) begin
      step_t t;
      t      = sched[pos];
      hold   = ($urandom_range(0, 5) == 0);
      bit_in = t.en ? t.b : 1'($urandom_range(0, 1));
      #1;
      check(pattern_valid == valid_next &&
            (!valid_next || pattern_seeded == seeded_next),
            $sformatf("pattern_valid at step %0d", pos));
      if (hold) begin
        check(!en && !shift, $sformatf("hold freezes at step %0d", pos));
        n_hold++;
        valid_next = 1'b0;
      end else begin
        check(en == t.en && shift == t.shift && mod1 == t.mod1,
              $sformatf("step %0d: en=%b shift=%b mod1=%b expected %b %b %b",
                        pos, en, shift, mod1, t.en, t.shift, t.mod1));
        if (!t.mod1) check(seed == t.b, $sformatf("seed bit at step %0d", pos));
        if (t.shift && t.mod1) begin
          check(mod2 == t.m2, $sformatf("mod2 at step %0d", pos));
          n_rot++;
        end
        valid_next  = t.last;
        seeded_next = t.is_seed;
        if (t.last) begin
          if (t.is_seed) n_seed++; else n_succ++;
        end
        pos++;
      end
      @(negedge clk);
    end
    hold = 1'b1;
    #1;
    check(pattern_valid == valid_next, "final pattern_valid");
    check(n_seed > 0 && n_succ > 0 && n_hold > 0 && n_rot > 0, "all codeword kinds and hold seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
