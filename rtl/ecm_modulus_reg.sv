// ecm_modulus_reg: the modulus register shared by the arithmetic units of a core
// (the "MulMod input" of the block diagram).
//
// Holds the scaled modulus Mt = M * (-M^-1 mod 2^17) as 16 words of 17 bits,
// written one word at a time by the host before a run, and presents all words
// in parallel: both Montgomery multipliers read Mt(j) and the adder reads 2*Mt
// from it. Mt = -1 (mod 2^17) is what lets the multipliers take the quotient
// straight from the running sum. The word-wise write port is this design's
// own choice. Writes take effect at the clock edge; the register resets to 0.
module ecm_modulus_reg
  import ecm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [WORD_AW-1:0]      idx,
  input  word_t                   wdata,
  output logic [W*CELL_WORDS-1:0] mod_t
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mod_t <= '0;
    else if (we) mod_t[idx*W +: W] <= wdata;
  end

endmodule
