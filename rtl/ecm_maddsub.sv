// ecm_maddsub: word-serial modular addition / subtraction with parallel reduction.
//
// Operands arrive one 17-bit word per cycle on a single port, interleaved
// a0, b0, a1, b1, ... (least significant word first), as they come out of the
// workspace memory. A first stage (the "calculation" DSP) forms R = A +/- B word
// by word with a carry chain; a second stage (the "reduction" DSP) forms, in
// parallel, S = R -/+ 2*Mt, where Mt is the modulus as the multipliers use it.
// Both result streams are kept in small buffers. When the last word has passed,
// the final carries decide which one is the reduced result:
//   add: S if R - 2Mt did not borrow, else R;
//   sub: R if A - B did not borrow, else S.
// Operands and results lie in [0, 2*Mt), the redundant range the Montgomery
// multipliers work in.
//
// Timing: with the first word in cycle 0 and words in consecutive cycles, done
// is high for one cycle in cycle 2b+2, i.e. the operation takes 2b+3 cycles as
// in the document's figure for this unit. The result is then read word by word
// through res_idx/res_word until the next operation starts.
//
// The two DSP stages and the cycle count follow the document; the buffering of
// both candidate results and the read-out port are this design's own choice.
module ecm_maddsub
  import ecm_pkg::*;
#(
  parameter int B_WORDS = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,   // operand word valid
  input  word_t                     in_word,    // a0,b0,a1,b1,...
  input  logic                      in_sub,     // 1 = subtract, sampled with a0
  input  logic [W*CELL_WORDS-1:0]   mod_t,      // modulus Mt, words 0..15
  input  logic [WORD_AW-1:0]        res_idx,
  output word_t                     res_word,
  output logic                      busy,
  output logic                      done
);

  localparam int IW = $clog2(B_WORDS + 1);

  // ---- input sequencing ----
  logic          phase_b;      // next word is a b-word
  logic [IW-1:0] in_idx;       // word index of the pair
  word_t         a_reg;
  logic          sub_q;
  logic          c1;           // DSP1 carry chain

  // ---- stage 1 output (calculation) ----
  logic          r_valid;
  word_t         r_q;
  logic [IW-1:0] r_idx;
  logic          r_last;

  // ---- stage 2 (reduction) ----
  logic          c2;
  word_t         r_buf [B_WORDS];
  word_t         s_buf [B_WORDS];
  logic          fin_q;
  logic          sel_s;

  logic [W:0]    sum1, sum2;
  word_t         m2_word;

  // stage 1: a +/- b with the carry chain (carry-in 1 on word 0 for subtraction)
  always_comb begin
    if (sub_q)
      sum1 = {1'b0, a_reg} + {1'b0, ~in_word} + {{W{1'b0}}, (in_idx == 0) ? 1'b1 : c1};
    else
      sum1 = {1'b0, a_reg} + {1'b0, in_word} + {{W{1'b0}}, (in_idx == 0) ? 1'b0 : c1};
  end

  // word r_idx of 2*Mt
  always_comb begin
    m2_word = mod_t[r_idx*W +: W] << 1;
    if (r_idx != 0) m2_word[0] = mod_t[r_idx*W - 1];
  end

  always_comb begin
    if (sub_q)  // S = R + 2Mt
      sum2 = {1'b0, r_q} + {1'b0, m2_word} + {{W{1'b0}}, (r_idx == 0) ? 1'b0 : c2};
    else        // S = R - 2Mt
      sum2 = {1'b0, r_q} + {1'b0, ~m2_word} + {{W{1'b0}}, (r_idx == 0) ? 1'b1 : c2};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_b <= 1'b0;
      in_idx  <= '0;
      a_reg   <= '0;
      sub_q   <= 1'b0;
      c1      <= 1'b0;
      c2      <= 1'b0;
      r_valid <= 1'b0;
      r_q     <= '0;
      r_idx   <= '0;
      r_last  <= 1'b0;
      fin_q   <= 1'b0;
      sel_s   <= 1'b0;
      done    <= 1'b0;
      busy    <= 1'b0;
    end else begin
      r_valid <= 1'b0;
      fin_q   <= 1'b0;
      done    <= fin_q;
      if (fin_q) busy <= 1'b0;
      // stage 0/1: operand words
      if (in_valid) begin
        if (!phase_b) begin
          a_reg <= in_word;
          if (in_idx == 0) begin
            sub_q <= in_sub;
            busy  <= 1'b1;
          end
          phase_b <= 1'b1;
        end else begin
          r_q     <= sum1[W-1:0];
          c1      <= sum1[W];
          r_idx   <= in_idx;
          r_last  <= (in_idx == IW'(B_WORDS - 1));
          r_valid <= 1'b1;
          phase_b <= 1'b0;
          in_idx  <= (in_idx == IW'(B_WORDS - 1)) ? '0 : in_idx + 1'b1;
        end
      end
      // stage 2: reduction
      if (r_valid) begin
        r_buf[r_idx] <= r_q;
        s_buf[r_idx] <= sum2[W-1:0];
        c2           <= sum2[W];
        if (r_last) begin
          fin_q <= 1'b1;
          // add: take S when R - 2Mt did not borrow; sub: take S when A - B borrowed
          sel_s <= sub_q ? !c1 : sum2[W];
        end
      end
    end
  end

  always_comb begin
    res_word = '0;
    for (int j = 0; j < B_WORDS; j++)
      if (res_idx == WORD_AW'(j)) res_word = sel_s ? s_buf[j] : r_buf[j];
  end

endmodule
