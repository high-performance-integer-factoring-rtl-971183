// tb_ecm_mmul: random Montgomery products against a reference for b = 10
// words (151-bit moduli), checking S*2^(17b) = A*B (mod Mt), S < 2*Mt and the
// b*(b+2)+6 cycle latency.
module tb_ecm_mmul;
  import ecm_pkg::*;
  import ecm_tb_pkg::*;

  localparam int B = 10;
  logic clk = 0, rst_n = 0;
  logic ld_we, ld_b, start, busy, done;
  logic [WORD_AW-1:0] ld_idx, res_idx;
  word_t ld_word, res_word;
  logic [W*CELL_WORDS-1:0] mod_t;
  int checks = 0, failures = 0, cyc = 0;

  ecm_mmul #(.B_WORDS(B)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t m, mt, a, b, got, r;
    int t0, lat;
    ld_we = 0; ld_b = 0; start = 0; ld_idx = '0; res_idx = '0; ld_word = '0;
    mt = make_modulus(17*B - 19, m);
    mod_t = mt[W*CELL_WORDS-1:0];
    r = pow2mod(17*B, mt);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      a = rand_big(17*B) % (mt << 1);
      b = rand_big(17*B) % (mt << 1);
      if (n == 0) begin a = (mt << 1) - 1; b = (mt << 1) - 1; end
      @(negedge clk);
      for (int i = 0; i < 2*B; i++) begin
        ld_we = 1; ld_b = (i >= B); ld_idx = WORD_AW'(i % B);
        ld_word = (i < B) ? a[i*W +: W] : b[(i-B)*W +: W];
        @(negedge clk);
      end
      ld_we = 0;
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      lat = cyc - t0 + 1;
      checks++;
      if (lat != B*(B+2) + 6) begin
        failures++;
        $display("latency %0d expected %0d", lat, B*(B+2)+6);
      end
      got = '0;
      for (int j = 0; j < B; j++) begin
        res_idx = WORD_AW'(j);
        #1 got[j*W +: W] = res_word;
      end
      checks++;
      if (got >= (mt << 1) || mulmod(got, r, mt) != mulmod(a, b, mt)) begin
        failures++;
        $display("FAIL a=%h b=%h got=%h", a, b, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
