// Encode-and-decode workload for one scan-chain length, used by tb_workload_iscas_sizes.
//
// It builds NPAT synthetic test cubes of L bits: a chain of patterns where each one is the
// previous one moved a few places round the ring (sometimes with the recirculated bits
// inverted, sometimes replaced by a fresh random pattern), after which every bit is turned
// into a don't-care with probability XPCT %. A greedy encoder then does what the
// compression method does for a given pattern order: for each cube it looks for the
// smallest rotation n (compatible polarity tried first) of the previous pattern that can
// agree with every specified bit of the cube, and emits "1 mode2 n"; when none exists
// within the count field it starts a new seed. Don't-care bits of a seed stay open until a
// later cube of its group fixes them (they are traced round the ring), and are sent as 0
// if none does.
// The stream is fed to annular_decompressor_top; every generated pattern must agree with
// its cube and equal the encoder's prediction, and each codeword must take its cycle budget.
// It reports the compression ratio (uncompressed bits - stream bits) / uncompressed bits and
// the clocks per pattern.
module workload_runner #(
  parameter int unsigned L     = 64,
  parameter int unsigned ENC_W = 6,
  parameter int unsigned NPAT  = 100,
  parameter int unsigned XPCT  = 85,   // don't-care percentage of the cubes
  parameter int unsigned MAXN  = 12,   // largest rotation used by the generator
  parameter string       NAME  = "w"
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  typedef bit [L-1:0] vec_t;

  logic         rst_n = 1'b0;
  logic         bit_in, en, scan_out, pattern_valid, pattern_seeded;
  logic [L-1:0] pattern;
  logic         bsr_tdo;
  logic [1:0]   bsr_core_in, bsr_pin_out;

  annular_decompressor_top #(.L(L), .ENC_W(ENC_W)) dut (
    .clk, .rst_n, .bit_in, .en, .pattern, .scan_out, .pattern_valid, .pattern_seeded,
    .capture(1'b0), .func_d('0),
    .bsr_ce(1'b0), .bsr_mode(1'b0), .bsr_shift_dr(1'b0), .bsr_tdi(1'b0), .bsr_tdo,
    .bsr_pin_in(2'b00), .bsr_core_in, .bsr_core_out(2'b00), .bsr_pin_out
  );

  vec_t        cube_v[$], cube_x[$];  // value and don't-care mask of each cube
  vec_t        expect_q[$];           // pattern the decoder must produce
  int unsigned budget[$];             // clocks each codeword must take
  bit          stream[$];
  int unsigned idx = 0;
  int unsigned n_seed = 0;

  // encoder state of the open group
  int          src[L], t_src[L];
  bit          par[L], t_par[L];
  bit          sk[L], sv[L];      // seed bit known / value
  bit          g_pol[$];
  int unsigned g_n[$];

  // emit the open group: its seed (open bits as 0), then its successor codewords, and
  // record the patterns the decoder must produce
  task automatic close_group();
    vec_t cur;
    for (int k = 0; k < L; k++) cur[k] = sk[k] ? sv[k] : 1'b0;
    stream.push_back(1'b0);
    for (int b = L - 1; b >= 0; b--) stream.push_back(cur[b]);
    budget.push_back(1 + L);
    expect_q.push_back(cur);
    foreach (g_n[j]) begin
      bit [31:0] nn;
      nn  = g_n[j];
      cur = ring(cur, g_pol[j], g_n[j]);
      stream.push_back(1'b1);
      stream.push_back(g_pol[j]);
      for (int b = ENC_W - 1; b >= 0; b--) stream.push_back(nn[b]);
      budget.push_back(2 + ENC_W + g_n[j]);
      expect_q.push_back(cur);
    end
    g_pol.delete();
    g_n.delete();
  endtask

  function automatic vec_t rnd_vec();
    vec_t v;
    for (int k = 0; k < L; k++) v[k] = 1'($urandom_range(0, 1));
    return v;
  endfunction

  function automatic vec_t ring(input vec_t v, input bit m2, input int unsigned n);
    vec_t r = v;
    for (int unsigned s = 0; s < n; s++) begin
      bit t = r[L-1];
      r = {r[L-2:0], m2 ? t : ~t};
    end
    return r;
  endfunction

  function automatic bit agrees(input vec_t v, input vec_t cv, input vec_t cx);
    return ((v ^ cv) & ~cx) == '0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s]: %s", NAME, what);
    end
  endtask

  initial begin
    vec_t        p;
    int unsigned nmax;
    longint      t0, cycles;
    int unsigned k;
    real         ratio;

    checks = 0; failures = 0; done = 1'b0;
    nmax = ((1 << ENC_W) - 1 < L - 1) ? (1 << ENC_W) - 1 : L - 1;

    // cubes
    p = rnd_vec();
    for (int i = 0; i < NPAT; i++) begin
      vec_t x;
      if (i > 0) begin
        if ($urandom_range(0, 99) < 5) p = rnd_vec();
        else p = ring(p, $urandom_range(0, 99) >= 30, $urandom_range(1, MAXN));
      end
      for (int b = 0; b < L; b++) x[b] = ($urandom_range(0, 99) < XPCT);
      cube_v.push_back(p & ~x);
      cube_x.push_back(x);
    end

    // greedy encoder. Within a group (one seed and its successors) every chain position is
    // traced to the seed bit it holds (src) and to whether that bit has been inverted an odd
    // number of times (par); seed bits stay open until some cube fixes them.
    for (int i = 0; i < NPAT; i++) begin
      bit          found;
      int unsigned best_n;
      bit          best_pol;
      best_n   = 0;
      best_pol = 1'b1;
      if (i > 0) begin
        for (int pol = 1; pol >= 0; pol--) begin
          for (int k = 0; k < L; k++) begin
            t_src[k] = src[k];
            t_par[k] = par[k];
          end
          for (int unsigned n = 1; n <= nmax; n++) begin
            bit ok;
            int last_s;
            bit last_p;
            if (best_n != 0 && n >= best_n) break;
            last_s = t_src[L-1];
            last_p = t_par[L-1];
            for (int k = L - 1; k > 0; k--) begin
              t_src[k] = t_src[k-1];
              t_par[k] = t_par[k-1];
            end
            t_src[0] = last_s;
            t_par[0] = last_p ^ !pol[0];
            ok = 1'b1;
            for (int k = 0; k < L && ok; k++)
              if (!cube_x[i][k] && sk[t_src[k]] && (sv[t_src[k]] ^ t_par[k]) != cube_v[i][k])
                ok = 1'b0;
            if (ok) begin
              best_n   = n;
              best_pol = pol[0];
              break;
            end
          end
        end
      end
      found = (best_n != 0);
      if (found) begin
        // commit the rotation and fix the seed bits this cube needs
        for (int unsigned s2 = 0; s2 < best_n; s2++) begin
          int last_s;
          bit last_p;
          last_s = src[L-1];
          last_p = par[L-1];
          for (int k = L - 1; k > 0; k--) begin
            src[k] = src[k-1];
            par[k] = par[k-1];
          end
          src[0] = last_s;
          par[0] = last_p ^ !best_pol;
        end
        for (int k = 0; k < L; k++)
          if (!cube_x[i][k] && !sk[src[k]]) begin
            sk[src[k]] = 1'b1;
            sv[src[k]] = cube_v[i][k] ^ par[k];
          end
        g_pol.push_back(best_pol);
        g_n.push_back(best_n);
      end else begin
        if (i > 0) close_group();
        for (int k = 0; k < L; k++) begin
          src[k] = k;
          par[k] = 1'b0;
          sk[k]  = !cube_x[i][k];
          sv[k]  = cube_v[i][k];
        end
        n_seed++;
      end
    end
    close_group();

    // decode
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t0 = 0; cycles = 0; k = 0;
    while (k < NPAT) begin
      @(posedge clk);
      cycles++;
      #1;
      if (pattern_valid) begin
        check(pattern == expect_q[k], $sformatf("pattern %0d differs from the encoder's", k));
        check(agrees(pattern, cube_v[k], cube_x[k]), $sformatf("pattern %0d violates its cube", k));
        check(cycles - t0 == longint'(budget[k]),
              $sformatf("pattern %0d took %0d clocks, budget %0d", k, cycles - t0, budget[k]));
        t0 = cycles;
        k++;
      end
    end
    ratio = 100.0 * (real'(NPAT) * L - stream.size()) / (real'(NPAT) * L);
    $display("[%s] L=%0d patterns=%0d seeds=%0d stream=%0d bits of %0d: compression %.2f %%, %.1f clocks per pattern",
             NAME, L, NPAT, n_seed, stream.size(), NPAT * L, ratio, real'(cycles) / NPAT);
    check(ratio > 0.0, "stream shorter than the uncompressed patterns");
    done = 1'b1;
  end

  // stream source
  assign bit_in = (idx < stream.size()) ? stream[idx] : 1'b0;
  always @(posedge clk) if (rst_n && en) idx <= idx + 1;
endmodule
