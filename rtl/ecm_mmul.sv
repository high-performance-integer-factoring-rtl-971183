// ecm_mmul: word-serial Montgomery multiplier with a simplified quotient.
//
// Computes S = A * B * 2^(-17*b) mod Mt, where Mt = M * (-M^-1 mod 2^17) is the
// modulus M scaled so that Mt = -1 (mod 2^17). With that scaling the quotient
// word of each step is simply the low word of the running sum, so no
// multiplication by -M^-1 is needed (Orup's simplification, quotient
// pipelining with delay 0). The multiplier B is scanned one word b(i) per
// outer step, least significant first; each outer step runs over the words j of
// the operands:
//     t     = S(j) + b(i)*A(j) + q(i)*Mt(j) + carry
//     S(j-1) = t mod 2^17,  carry = t div 2^17
// which is the work of the document's three DSP slices (two multiply-adds and
// a shift-accumulate). One word is processed per cycle and an outer step takes
// b+2 cycles, b operand words plus two for the carries.
// Inputs and output lie in [0, 2*Mt); this holds without a final subtraction
// as long as 4*Mt < 2^(17*b), i.e. M has at most 17*b-19 bits.
//
// Interface: A and B are written word by word through ld_*, then start is
// pulsed. Mt comes from the shared modulus register. done is high for one cycle,
// b*(b+2)+5 cycles after the start cycle, so one multiplication takes
// b*(b+2)+6 cycles as given in the document. The document's datapath is a
// pipeline of DSP registers; this model processes a word in one cycle, and the
// start cycle plus five cycles before done stand for the fill of that
// pipeline, keeping the document's cycle count. The result is read through res_idx/res_word.
module ecm_mmul
  import ecm_pkg::*;
#(
  parameter int B_WORDS = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ld_we,
  input  logic                      ld_b,       // 0: operand A, 1: operand B
  input  logic [WORD_AW-1:0]        ld_idx,
  input  word_t                     ld_word,
  input  logic [W*CELL_WORDS-1:0]   mod_t,      // Mt, words 0..15
  input  logic                      start,
  input  logic [WORD_AW-1:0]        res_idx,
  output word_t                     res_word,
  output logic                      busy,
  output logic                      done
);

  localparam int NS       = B_WORDS + 2;         // words of the running sum
  localparam int JW       = $clog2(NS);
  localparam int IW       = $clog2(B_WORDS);
  localparam int CW       = 20;                  // carry width
  localparam int FILL     = 4;                   // fill cycles between the last word and done

  word_t         a_q [B_WORDS];
  word_t         b_q [B_WORDS];
  word_t         s_q [NS];
  logic [JW-1:0] j_q;
  logic [IW-1:0] i_q;
  word_t         q_q;
  logic [CW-1:0] carry_q;
  logic          run_q;
  logic [2:0]    fill_q;
  logic          fill_run_q;

  word_t         a_j, m_j, b_i, q_cur;
  logic [W+CW-1:0] t;

  always_comb begin
    a_j = '0;
    m_j = '0;
    for (int k = 0; k < B_WORDS; k++)
      if (j_q == JW'(k)) begin
        a_j = a_q[k];
        m_j = mod_t[k*W +: W];
      end
    b_i = '0;
    for (int k = 0; k < B_WORDS; k++)
      if (i_q == IW'(k)) b_i = b_q[k];
  end

  // word j of S + b(i)*A + q*Mt, plus the carry of word j-1
  always_comb begin
    logic [2*W-1:0] ba;
    logic [W-1:0]   s_j;
    s_j = '0;
    for (int k = 0; k < NS; k++)
      if (j_q == JW'(k)) s_j = s_q[k];
    ba    = b_i * a_j;
    // quotient of this step: low word of S(0) + b(i)*A(0)
    q_cur = (j_q == '0) ? (s_j + ba[W-1:0]) : q_q;
    t     = (W+CW)'(s_j) + (W+CW)'(ba) + (W+CW)'(q_cur * m_j)
          + ((j_q == '0) ? '0 : (W+CW)'(carry_q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j_q        <= '0;
      i_q        <= '0;
      q_q        <= '0;
      carry_q    <= '0;
      run_q      <= 1'b0;
      fill_q     <= '0;
      fill_run_q <= 1'b0;
      done       <= 1'b0;
      for (int k = 0; k < NS; k++) s_q[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        run_q <= 1'b1;
        j_q   <= '0;
        i_q   <= '0;
        for (int k = 0; k < NS; k++) s_q[k] <= '0;
      end else if (run_q) begin
        q_q     <= q_cur;
        carry_q <= t[W+CW-1:W];
        if (j_q != '0) s_q[j_q - 1'b1] <= t[W-1:0];
        if (j_q == JW'(NS - 1)) begin
          j_q <= '0;
          if (i_q == IW'(B_WORDS - 1)) begin
            run_q      <= 1'b0;
            fill_run_q <= 1'b1;
            fill_q     <= 3'(FILL - 1);
          end else begin
            i_q <= i_q + 1'b1;
          end
        end else begin
          j_q <= j_q + 1'b1;
        end
      end else if (fill_run_q) begin
        if (fill_q == '0) begin
          fill_run_q <= 1'b0;
          done       <= 1'b1;
        end else begin
          fill_q <= fill_q - 1'b1;
        end
      end
    end
  end

  assign busy = run_q || fill_run_q;

  // operand load port
  always_ff @(posedge clk) begin
    if (ld_we) begin
      for (int k = 0; k < B_WORDS; k++)
        if (ld_idx == WORD_AW'(k)) begin
          if (ld_b) b_q[k] <= ld_word;
          else      a_q[k] <= ld_word;
        end
    end
  end

  always_comb begin
    res_word = '0;
    for (int k = 0; k < B_WORDS; k++)
      if (res_idx == WORD_AW'(k)) res_word = s_q[k];
  end

endmodule
