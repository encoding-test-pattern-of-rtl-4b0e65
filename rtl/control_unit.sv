// Control unit of the annular-scan-chain decompressor.
//
// It reads the compressed stream one bit per clock on bit_in and turns it into the select
// signals of the head-of-chain multiplexer (mod1), of the XOR gate (mod2), the serial seed
// bit (seed) and the chain's clock enable (shift). A codeword is
//   0 b(L-1) ... b(0)          seed: L bits, sent last-bit-first, so that after L shifts
//                              bit b(k) sits in flip-flop k+1
//   1 m2 e(ENC_W-1) ... e(0)   successor: rotate the chain n = e positions, the tail
//                              re-entering the head inverted when m2 = 0
// en is high in every cycle in which a stream bit is consumed; the source must present the
// next bit on bit_in in each such cycle and may pause the unit with hold. While the chain
// rotates, en is low and no stream bit is taken.
//
// Timing: a seed codeword takes 1 + L cycles, a successor 2 + ENC_W + n cycles (the
// "log2 L + 2 bits plus n shift clocks per pattern" cost of the method). pattern_valid is
// high for one cycle right after the last shift of a codeword, when the chain holds the
// new pattern; for n = 0 it follows the last count bit and the chain is unchanged.
//
// The stream layout (mode1, then seed or mode2 and encode), the select polarities and the
// 4-bit count default follow the method's worked example; the bit order of the seed, the
// MSB-first count, the hold input and the reset state are this design's choices.
module control_unit #(
  parameter int unsigned L     = annular_pkg::L_DEFAULT,     // pattern length
  parameter int unsigned ENC_W = annular_pkg::ENC_W_DEFAULT  // shift-count field width
) (
  input  logic clk,
  input  logic rst_n,          // synchronous, active low
  input  logic bit_in,         // compressed stream, one bit per cycle while en = 1
  input  logic hold,           // 1 freezes the unit (no bit consumed, chain held)
  output logic en,             // a stream bit is consumed in this cycle
  output logic mod1,           // 0: seed to chain head, 1: recirculate chain tail
  output logic mod2,           // 1: recirculate unchanged, 0: recirculate inverted
  output logic seed,           // serial seed bit
  output logic shift,          // clock enable of the scan chain
  output logic pattern_valid,  // chain holds a freshly generated pattern
  output logic pattern_seeded  // with pattern_valid: the pattern came from a seed
);
  import annular_pkg::*;

  localparam int unsigned CW = ($clog2(L + 1) > ENC_W) ? $clog2(L + 1) : ENC_W;

  cu_state_e       state;
  logic [CW-1:0]   cnt;       // bits left to read (ST_SEED, ST_ENC) or shifts left (ST_ROT)
  logic [ENC_W-2:0] enc;      // leading bits of the shift count being read
  logic [ENC_W-1:0] enc_next; // shift count including the bit on bit_in
  logic            mod2_q;

  always_comb begin
    en    = 1'b0;
    shift = 1'b0;
    mod1  = 1'b1;
    seed  = 1'b0;
    if (!hold) begin
      unique case (state)
        ST_MODE1, ST_MODE2, ST_ENC: en = 1'b1;
        ST_SEED: begin
          en    = 1'b1;
          shift = 1'b1;
          mod1  = 1'b0;
          seed  = bit_in;
        end
        ST_ROT:  shift = 1'b1;
        default: ;
      endcase
    end
  end

  assign mod2     = mod2_q;
  assign enc_next = {enc, bit_in};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= ST_MODE1;
      cnt            <= '0;
      enc            <= '0;
      mod2_q         <= 1'b1;
      pattern_valid  <= 1'b0;
      pattern_seeded <= 1'b0;
    end else begin
      pattern_valid <= 1'b0;
      if (!hold) begin
        unique case (state)
          ST_MODE1: begin
            if (bit_in) begin
              state <= ST_MODE2;
            end else begin
              state <= ST_SEED;
              cnt   <= CW'(L);
            end
          end
          ST_SEED: begin
            cnt <= cnt - 1'b1;
            if (cnt == CW'(1)) begin
              state          <= ST_MODE1;
              pattern_valid  <= 1'b1;
              pattern_seeded <= 1'b1;
            end
          end
          ST_MODE2: begin
            mod2_q <= bit_in;
            state  <= ST_ENC;
            cnt    <= CW'(ENC_W);
            enc    <= '0;
          end
          ST_ENC: begin
            enc <= enc_next[ENC_W-2:0];
            cnt <= cnt - 1'b1;
            if (cnt == CW'(1)) begin
              if (enc_next == '0) begin
                state          <= ST_MODE1;
                pattern_valid  <= 1'b1;
                pattern_seeded <= 1'b0;
              end else begin
                state <= ST_ROT;
                cnt   <= CW'(enc_next);
              end
            end
          end
          ST_ROT: begin
            cnt <= cnt - 1'b1;
            if (cnt == CW'(1)) begin
              state          <= ST_MODE1;
              pattern_valid  <= 1'b1;
              pattern_seeded <= 1'b0;
            end
          end
          default: state <= ST_MODE1;
        endcase
      end
    end
  end

  // Handshake rules: no stream bit is taken while the chain rotates, the seed channel is
  // selected only while a seed is shifted in, and nothing moves while held.
  a_no_bit_in_rotation: assert property (@(posedge clk) disable iff (!rst_n)
      (state == ST_ROT) |-> !en);
  a_seed_only_in_seed:  assert property (@(posedge clk) disable iff (!rst_n)
      !mod1 |-> (state == ST_SEED));
  a_hold_freezes:       assert property (@(posedge clk) disable iff (!rst_n)
      hold |-> (!en && !shift));

  initial begin
    assert (ENC_W >= 2) else $error("control_unit: ENC_W must be at least 2");
  end
endmodule
