// End-to-end testbench of annular_decompressor_top at its default size (40-bit patterns,
// 4-bit shift counts, 2 + 2 boundary cells).
//
// It sends a compressed stream built from the 40-bit patterns of the worked example:
// seed T9 followed by the backward-compatible successor codeword 100010, then seed T7
// followed by the compatible successors T8 (110101), T3 (110010), T5 (111000) and
// T6 (110100). Each generated pattern is compared with an independent reference model of
// the ring (rotate right, recirculated bits inverted for mode2 = 0) and, where the example
// lists the pattern, checked to agree with every specified bit of it. Then come a zero-shift
// codeword, a codeword interrupted by a functional capture (which must pause decoding and
// load the response into the chain) and random codewords. The cycle count of every codeword
// is checked (1 + L for a seed, 2 + ENC_W + n for a successor, plus paused cycles). Finally
// the boundary scan register is taken through normal mode, shift and capture.
// Every mechanism must occur at least once.
module tb_annular_decompressor_top;
  localparam int unsigned L     = 40;
  localparam int unsigned ENC_W = 4;
  localparam int unsigned NB    = 4;  // boundary cells (2 in + 2 out)
  localparam int unsigned NRAND = 24;

  typedef struct {
    bit          is_seed;
    bit [L-1:0]  seed;
    bit          m2;
    int unsigned n;
    string       ref_str;  // example pattern to agree with, "" if none
    bit          cap;      // inject a functional capture while this codeword is read
  } cw_t;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             bit_in;
  logic             en;
  logic [L-1:0]     pattern;
  logic             scan_out, pattern_valid, pattern_seeded;
  logic             capture = 1'b0;
  logic [L-1:0]     func_d = '0;
  logic             bsr_ce = 1'b0, bsr_mode = 1'b0, bsr_shift_dr = 1'b0, bsr_tdi = 1'b0;
  logic             bsr_tdo;
  logic [1:0]       bsr_pin_in = '0, bsr_core_in, bsr_core_out = '0, bsr_pin_out;

  annular_decompressor_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_seed = 0, n_compat = 0, n_backward = 0, n_zero = 0, n_capture = 0;
  int n_table = 0, n_bsr_normal = 0, n_bsr_shift = 0, n_bsr_capture = 0;

  cw_t         cws[$];
  bit          stream[$];
  int unsigned cw_start[$];   // stream index of each codeword's first bit
  int unsigned idx = 0;       // next stream bit
  longint      cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit [L-1:0] from_str(input string s);
    bit [L-1:0] v = '0;
    for (int k = 0; k < L; k++) v[k] = (s[k] == "1");
    return v;
  endfunction

  function automatic bit [L-1:0] x_mask(input string s);
    bit [L-1:0] v = '0;
    for (int k = 0; k < L; k++) v[k] = (s[k] == "x");
    return v;
  endfunction

  // every bit specified both in the example pattern and in the seed it came from
  // (xm marks bits that stem from a don't-care seed bit) equals the generated bit
  function automatic bit agrees(input bit [L-1:0] v, input bit [L-1:0] xm, input string s);
    for (int k = 0; k < L; k++)
      if (s[k] != "x" && !xm[k] && v[k] != (s[k] == "1")) return 1'b0;
    return 1'b1;
  endfunction

  // reference ring: each step moves bit k to k+1 and the last bit to the head
  function automatic bit [L-1:0] ring(input bit [L-1:0] v, input bit m2, input int unsigned n);
    bit [L-1:0] r = v;
    for (int unsigned s = 0; s < n; s++) begin
      bit t = r[L-1];
      for (int k = L - 1; k > 0; k--) r[k] = r[k-1];
      r[0] = m2 ? t : ~t;
    end
    return r;
  endfunction

  function automatic void add_seed(input bit [L-1:0] v, input string ref_s);
    cw_t c;
    c.is_seed = 1'b1; c.seed = v; c.m2 = 1'b0; c.n = 0; c.ref_str = ref_s; c.cap = 1'b0;
    cw_start.push_back(stream.size());
    cws.push_back(c);
    stream.push_back(1'b0);
    for (int k = L - 1; k >= 0; k--) stream.push_back(v[k]);
  endfunction

  function automatic void add_succ(input bit m2, input int unsigned n, input string ref_s,
                                   input bit cap);
    cw_t c;
    c.is_seed = 1'b0; c.seed = '0; c.m2 = m2; c.n = n; c.ref_str = ref_s; c.cap = cap;
    cw_start.push_back(stream.size());
    cws.push_back(c);
    stream.push_back(1'b1);
    stream.push_back(m2);
    for (int b = ENC_W - 1; b >= 0; b--) stream.push_back(n[b]);
  endfunction

  // example patterns with all 40 bits legible (x = don't care, filled with 0 in seeds)
  localparam string T9 = "000110101100011x010010111001010101010110";
  localparam string T7 = "01111001010011100x1011010001101010101010";
  localparam string T8 = "01010011x1001010011100110110100011010101";
  localparam string T3 = "010101001x110010100111001101101000110101";
  localparam string T5 = "001101010101x100111100101001110011011010";
  localparam string T6 = "10100011010101x1010011110010100111001101";

  // stream source: present the next bit, advance when it is consumed
  assign bit_in = (idx < stream.size()) ? stream[idx] : 1'b0;

  // decoder monitor and reference model
  int unsigned  k_cw = 0;        // codeword expected next at pattern_valid
  longint       t_start[$];      // cycle each codeword's first bit was taken
  int unsigned  k_st = 0;        // codeword whose first bit is awaited
  int unsigned  held = 0;        // paused cycles inside the current codeword
  bit [L-1:0]   model = '0;      // chain content expected
  bit [L-1:0]   model_x = '0;    // positions holding a don't-care bit of the seed
  bit [L-1:0]   cap_val = '0;
  bit           cap_seen = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (capture) begin
        held++;
        cap_seen = 1'b1;
        cap_val  = func_d;
        check(!en, "no stream bit taken during capture");
      end
      if (en) begin
        // the first bit of a codeword is taken in the cycle that signals the previous one
        if (k_st < cws.size() && idx == cw_start[k_st]) begin
          t_start.push_back(cycle);
          k_st++;
        end
        idx <= idx + 1;
      end
      if (pattern_valid && k_cw < cws.size()) begin
        cw_t c;
        int unsigned exp_len;
        c = cws[k_cw];
        if (c.is_seed) begin
          model   = c.seed;
          model_x = (c.ref_str != "") ? x_mask(c.ref_str) : '0;
          exp_len = 1 + L;
          n_seed++;
        end else begin
          model   = ring(cap_seen ? cap_val : model, c.m2, c.n);
          model_x = cap_seen ? '0 : ring(model_x, 1'b1, c.n);
          exp_len = 2 + ENC_W + c.n;
          if (c.n == 0) n_zero++;
          else if (c.m2) n_compat++;
          else n_backward++;
        end
        exp_len += held;
        check(pattern == model, $sformatf("codeword %0d: pattern %h expected %h",
                                          k_cw, pattern, model));
        check(pattern_seeded == c.is_seed, $sformatf("codeword %0d: pattern_seeded", k_cw));
        check(cycle - t_start[k_cw] == longint'(exp_len),
              $sformatf("codeword %0d: %0d cycles, expected %0d", k_cw, cycle - t_start[k_cw], exp_len));
        check(scan_out == pattern[L-1], "scan_out is the chain tail");
        if (c.ref_str != "") begin
          check(agrees(pattern, model_x, c.ref_str),
                $sformatf("codeword %0d disagrees with example pattern %s", k_cw, c.ref_str));
          n_table++;
        end
        if (cap_seen) n_capture++;
        cap_seen = 1'b0;
        held     = 0;
        k_cw++;
      end
    end
  end

  // functional capture injected in the middle of a marked codeword's count field
  always @(negedge clk) begin
    capture <= 1'b0;
    if (rst_n && k_cw < cws.size() && cws[k_cw].cap && !cap_seen && !capture &&
        idx == cw_start[k_cw] + 3) begin
      capture <= 1'b1;
      func_d  <= {$urandom(), $urandom()};
    end
  end

  initial begin
    // watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [L-1:0] r;
    add_seed(from_str(T9), T9);
    add_succ(1'b0, 2, "", 1'b0);    // 100010: backward-compatible successor of T9
    add_seed(from_str(T7), T7);
    add_succ(1'b1, 5, T8, 1'b0);    // 110101
    add_succ(1'b1, 2, T3, 1'b0);    // 110010
    add_succ(1'b1, 8, T5, 1'b0);    // 111000
    add_succ(1'b1, 4, T6, 1'b0);    // 110100
    add_succ(1'b1, 0, "", 1'b0);    // zero shift: pattern repeated
    add_succ(1'b1, 3, "", 1'b1);    // interrupted by a functional capture
    add_succ(1'b0, 7, "", 1'b0);
    r = {$urandom(), $urandom()};
    add_seed(r, "");
    for (int i = 0; i < NRAND; i++) add_succ($urandom_range(0, 1), $urandom_range(0, 15), "", 1'b0);

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (k_cw == cws.size());
    @(negedge clk);
    // the stream is used up; the edge that signalled the last pattern took one bit beyond it
    check(idx == stream.size() + 1, "whole stream consumed");

    // boundary scan register: normal mode passes pins through
    bsr_mode = 1'b0; bsr_pin_in = 2'b10; bsr_core_out = 2'b01;
    #1;
    check(bsr_core_in == 2'b10 && bsr_pin_out == 2'b01, "boundary register normal mode");
    n_bsr_normal++;
    // test mode: shift 1,0,1,1 in (first bit ends in the last cell)
    bsr_mode = 1'b1; bsr_ce = 1'b1; bsr_shift_dr = 1'b1;
    for (int i = 0; i < NB; i++) begin
      bsr_tdi = (i == 1) ? 1'b0 : 1'b1;
      @(negedge clk);
    end
    // the first bit sent ends in the last cell
    check(bsr_core_in == 2'b11 && bsr_pin_out == 2'b10,
          $sformatf("boundary register shifted vector applied: core_in %b pin_out %b",
                    bsr_core_in, bsr_pin_out));
    n_bsr_shift++;
    // capture the core's outputs and pins, then shift out through tdo
    bsr_shift_dr = 1'b0; bsr_pin_in = 2'b01; bsr_core_out = 2'b10;
    @(negedge clk);
    bsr_shift_dr = 1'b1;
    begin
      bit [NB-1:0] got;
      for (int i = 0; i < NB; i++) begin
        got[NB-1-i] = bsr_tdo;
        @(negedge clk);
      end
      check(got == {2'b10, 2'b01}, $sformatf("boundary register captured %b", got));
      n_bsr_capture++;
    end

    check(n_seed > 0,        "seed load occurred");
    check(n_compat > 0,      "compatible rotation occurred");
    check(n_backward > 0,    "backward-compatible rotation occurred");
    check(n_zero > 0,        "zero-shift codeword occurred");
    check(n_capture > 0,     "capture pause occurred");
    check(n_table == 6,      "all example patterns checked");
    check(n_bsr_normal > 0 && n_bsr_shift > 0 && n_bsr_capture > 0, "boundary register modes");
    $display("mechanisms: seed=%0d compatible=%0d backward=%0d zero=%0d capture=%0d example=%0d bsr=%0d/%0d/%0d",
             n_seed, n_compat, n_backward, n_zero, n_capture, n_table,
             n_bsr_normal, n_bsr_shift, n_bsr_capture);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
