# Annular scan chain test-pattern decompressor

Scan testing a core means shifting one long test pattern after another into its scan
chain. Shipping all of them from the tester costs tester memory and pin bandwidth. Test
patterns are mostly don't-care bits, though. So a pattern can often be made from the one
before it by turning the scan chain into a ring and rotating the old pattern by a few
places. When the specified bits of the new pattern then all match, nothing but the
rotation count has to be sent.

This RTL is the on-chip half of that scheme. A small control unit reads the compressed
bit stream from the tester. A 2:1 multiplexer and an XOR gate feed the head of the chain.
The scan chain's tail is fed back to its head, so the chain forms a ring. Only a seed
pattern is shifted in bit by bit. Each later pattern is produced by rotating the chain
`n` clocks, which usually takes far fewer than the `L` clocks of a full scan load.

## Rings, compatibility and don't-cares

Number the flip-flops of the chain 1 … L and call the bit in flip-flop `k+1` `B(k)`. One
clock of rotation moves flip-flop `i` into flip-flop `i+1` and flip-flop `L` into flip-flop
1. Written as a string `B(0) B(1) … B(L-1)`, this is a rotation to the right: `x0011`
becomes `1x001`.

Two patterns are *compatible* when no bit position has a 0 in one and a 1 in the other
(`x` matches anything). They are *backward-compatible* when no position has equal
specified values. The compression step orders the test set into a chain
`T_seed → T_a → T_b → …`, the *linear generation graph*. Each pattern in it is compatible,
or backward-compatible, with its predecessor rotated by some `n`, and `n` is the edge
weight. Only the first pattern is sent in full. This ordering is done offline, in
software, and is not part of the RTL.

## The compressed stream

The stream is a sequence of codewords. The tester sends one bit per clock, in every
clock in which `en` is high:

| codeword | bits | meaning | clocks |
|---|---|---|---|
| seed | `0`, then `b(L-1) … b(0)` | shift a new pattern into the chain | 1 + L |
| successor | `1`, `mode2`, `n` (ENC_W bits, MSB first) | rotate the chain `n` places | 2 + ENC_W + n |

`mode2 = 1` rotates the pattern unchanged: the successor is compatible. `mode2 = 0`
inverts each bit that passes from the tail back to the head: the successor is
backward-compatible. The seed is sent last bit first, so that `b(k)` lands in
flip-flop `k+1`. A count of 0 repeats the pattern.

Worked example with L = 40 and 4-bit counts. The chain of nine patterns
`T4 → T1 → T2 → T9 → T7 → T8 → T3 → T5 → T6` has edge weights 3, 2, 4, 2, 5, 2, 8, 4.
It encodes as

```
T4: 0 + 40 seed bits
T1: 1 1 0011    T2: 1 0 0010    T9: 1 1 0100    T7: 1 0 0010
T8: 1 1 0101    T3: 1 1 0010    T5: 1 1 1000    T6: 1 1 0100
```

That is 89 stream bits instead of 360 (a compression ratio of 75 %). It decodes in
41 + 8·6 + 31 = 120 clocks instead of 360. The full-size testbench seeds the chain with
T7 and decodes `110101 110010 111000 110100`. It checks that the results agree with every
specified bit of T8, T3, T5 and T6.

Per pattern the cost is `(ENC_W + 2)` stream bits and `ENC_W + 2 + n` clocks. Summed over
a graph this is at most `L + (log2 L + 2)·N` clocks for N successors, since the weights add
up to less than L. Setting `ENC_W = ceil(log2 L)` lets the count reach any rotation. The
default of 4 bits covers rotations up to 15.

## The inversion path: what it does and does not do

The XOR gate sits in the serial feedback path, between the chain's tail `Q` and the
multiplexer. During an `n`-clock rotation with `mode2 = 0`, only the `n` bits that wrap
around are inverted. The other `L − n` bits move along unchanged. The hardware therefore
produces

    next = rotate_right(cur, n), with bits B(0) … B(n-1) inverted

and not the complement of the whole rotated pattern. This matters for an encoder:

* A *compatible* step (`mode2 = 1`) is exact. The four compatible steps of the example
  decode to the listed patterns.
* A *backward-compatible* step works as stated above. In the example, the step T9 → T7
  (codeword `100010`) compares T7 with the complement of the whole rotated T9. This
  decoder does not reproduce it: it inverts only the two bits that wrap around. An
  encoder written for this RTL has to use the formula above when it checks a
  backward-compatible candidate. The workload testbench's encoder does so.

Producing a full complement in `n` clocks would need an inverter on every flip-flop, or
`L` extra rotation clocks. Neither is part of this design.

The polarity of `mode2` follows the printed codewords, where compatible successors carry
`mode2 = 1` and backward-compatible ones `mode2 = 0`. It also matches the inverting bubble
on the gate output. The reading "`mod2 = 1` inverts" was not used.

## Blocks

```
             bit_in ──►┌──────────────┐ en ──►
                       │ control_unit │── shift ───────────────┐
                       └──┬────┬───┬──┘                        │
                    seed  │mod1│   │mod2                       ▼
                          ▼    ▼   ▼                ┌────────────────────┐
                       ┌──────────────┐    td       │ annular_scan_chain │──► pattern[L-1:0]
                       │ feedback_mux │───────────► │   FF1 → … → FFL    │◄── func_d[L-1:0]
                       └──────────────┘             └─────────┬──────────┘
                              ▲          q (tail)             │
                              └───────────────────────────────┘
```

* **`control_unit`** is a five-state machine: MODE1, SEED, MODE2, ENC and ROT. One
  counter counts seed bits, count bits and rotation clocks. `en` is high in MODE1, SEED,
  MODE2 and ENC, and low in ROT. `shift` is high in SEED and ROT. `mod1` is 0 only in SEED.
  `pattern_valid` pulses in the clock after the last shift of a codeword. `pattern_seeded`
  then tells a seed from a successor. `hold` freezes the machine. Assertions check that no
  stream bit is taken during a rotation, that the seed channel is used only in SEED, and
  that `hold` stops everything.
* **`feedback_mux`** computes `td = mod1 ? (mod2 ? q : ~q) : seed`.
* **`annular_scan_chain`** has L flip-flops, each with a multiplexer in front of D.
  `sel = 1` makes it a shift register from `td` to `q`. `sel = 0` lets every flip-flop
  capture its functional input `func_d[k]`. `shift` is the clock enable. The ring is
  closed outside the block, through `feedback_mux`.
* **`annular_decompressor_top`** wires these three together. The logic under test is not
  part of the design. It reads `pattern`, and its response comes back on `func_d`, which
  is captured when `capture = 1`. A capture also holds the control unit, so the two never
  collide. Note that a capture overwrites the chain, and with it the pattern the next
  rotation would start from.
* **`boundary_scan_cell` / `boundary_scan_register`** form the boundary register of a
  wrapped core: cells on N_IN = 2 core inputs and N_OUT = 2 core outputs, chained as
  `tdi → inputs → outputs → tdo`. In normal mode (`mode = 0`) pins pass straight to the
  core and back. In test mode the cells drive the core and capture (`shift_dr = 0`) or shift
  (`shift_dr = 1`) on clocks with `ce = 1`. Each cell is one flip-flop, with no separate
  update stage. No link between this register and the decompressor is defined, so it sits
  in the top with its own `bsr_*` ports.

`annular_pkg` holds the default sizes and the control unit's state type.

## Interface and timing of the top

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising edge; synchronous active-low reset clears all flip-flops |
| `bit_in` | in | 1 | stream bit, must be valid in every clock with `en = 1` |
| `en` | out | 1 | the stream bit is consumed at this clock edge |
| `pattern` | out | L | chain contents, `pattern[k]` = flip-flop k+1 |
| `scan_out` | out | 1 | chain tail |
| `pattern_valid`, `pattern_seeded` | out | 1 | a new pattern is in the chain (from a seed) |
| `capture`, `func_d` | in | 1, L | functional capture into the chain; pauses decoding |
| `bsr_*` | | | boundary register: `ce`, `mode`, `shift_dr`, `tdi`, `tdo`, `pin_in`, `core_in`, `core_out`, `pin_out` |

The stream has no valid signal. The source either keeps up with `en` or pauses the
decoder. After reset the decoder expects the first bit of a codeword. `pattern_valid`
comes in the same clock in which the first bit of the next codeword is taken.

Parameters: `L` (chain length, default 40), `ENC_W` (count width, default 4), `N_IN`,
`N_OUT` (default 2 each). The defaults are the sizes of the worked example. A real core
needs `L` equal to its scan length and `ENC_W = ceil(log2 L)`.

## Sizes

With its default parameters the design holds the 40-bit worked example. The benchmark
circuits the scheme is usually measured on have much longer full-scan patterns. These
widths are the usual figures for the circuits, not numbers from this design: 214 bits
(s5378), 247 (s9234), 700 (s13207), 611 (s15850), 1664 (s38417) and 1464 (s38584). They
need `L` set to those values and an 8- to 11-bit count. `tb_workload_iscas_sizes` runs
exactly those configurations. It uses synthetic test cubes, 85 % don't-care, in a given
order. Its greedy encoder reaches compression ratios of about 77–86 % and 58–283 clocks per
pattern. The real test sets were not available, so these figures say nothing about them.
Published figures for this scheme on those circuits lie between 59 % and 88 %.
They come from an encoder that also chooses the pattern order.

After synthesis the default top is 61 flip-flops and about 90 word-level cells. The
chain accounts for 40 of the flip-flops and the control unit for 17.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line:

* `tb_annular_decompressor_top` runs the full design at its default parameters. It
  decodes the example codewords, a zero-count codeword, a codeword interrupted by a
  functional capture, and random codewords. Every pattern is compared with a reference
  ring model and, where the example lists it, with the listed pattern. It also checks the
  clock count of every codeword, and takes the boundary register through normal mode,
  shift and capture. It counts each mechanism (seed, compatible, backward, zero shift,
  capture) and fails if one never occurs.
* `tb_control_unit` checks `en`, `shift`, `mod1`, `mod2`, `seed` and `pattern_valid` clock
  by clock against a schedule built from random codewords, with random `hold`.
* `tb_annular_scan_chain`, `tb_feedback_mux`, `tb_boundary_scan_cell` and
  `tb_boundary_scan_register` compare against reference models under random or exhaustive
  stimulus.
* `tb_workload_iscas_sizes` (with `tb/workload_runner.sv`) runs an encode/decode round trip
  at the six benchmark scan lengths.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/annular_pkg.sv \
    tb/tb_annular_decompressor_top.sv --top-module tb_annular_decompressor_top
./obj_dir/Vtb_annular_decompressor_top
```

The testbenches use only two-state values and `$urandom`. Each has a watchdog.

## Design choices not fixed by the method

* The codeword layout comes from the worked example: `mode1 mode2 encode`, with a seed
  marked by `mode1 = 0`. The following were chosen here: the seed bit order, the MSB-first
  count, the meaning of a zero count, `hold`, and the synchronous reset to 0.
* `en` is an output that requests stream input.
* The chain has a clock enable, so that it holds while a codeword is read.
* The boundary scan cell is the simplest one that shows the described behaviour. The
  order of the cells along the boundary path is a free choice.
* Not included: the logic under test, the compactor of test responses, the tester, pad
  buffers and the offline encoder that builds the generation graph.
