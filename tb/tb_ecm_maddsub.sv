// tb_ecm_maddsub: random modular additions and subtractions against a
// reference, plus the 2b+3 cycle latency, for the 151-bit configuration
// (b = 10 words) and random operands in [0, 2*Mt).
module tb_ecm_maddsub;
  import ecm_pkg::*;
  import ecm_tb_pkg::*;

  localparam int B = 10;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_sub, busy, done;
  word_t in_word, res_word;
  logic [WORD_AW-1:0] res_idx;
  logic [W*CELL_WORDS-1:0] mod_t;
  int checks = 0, failures = 0, cyc = 0;

  ecm_maddsub #(.B_WORDS(B)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(input big_t a, input big_t b, input logic sub, input big_t mt);
    big_t got, m2, expv;
    int t0, lat;
    t0 = -1;
    @(negedge clk);
    for (int i = 0; i < 2*B; i++) begin
      in_valid = 1;
      in_sub   = sub;
      in_word  = (i % 2 == 0) ? a[(i/2)*W +: W] : b[(i/2)*W +: W];
      if (i == 0) t0 = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0 + 1;
    checks++;
    if (lat != 2*B + 3) begin
      failures++;
      $display("latency %0d, expected %0d", lat, 2*B + 3);
    end
    got = '0;
    for (int j = 0; j < B; j++) begin
      res_idx = WORD_AW'(j);
      #1 got[j*W +: W] = res_word;
    end
    m2 = mt << 1;
    expv = sub ? submod(a, b, mt) : addmod(a, b, mt);
    checks++;
    if (got >= m2 || (got % mt) != expv) begin
      failures++;
      $display("FAIL sub=%0d a=%h b=%h got=%h", sub, a, b, got);
    end
  endtask

  initial begin
    big_t m, mt, a, b;
    in_valid = 0; in_sub = 0; in_word = '0; res_idx = '0;
    mt = make_modulus(17*B - 19, m);
    mod_t = mt[W*CELL_WORDS-1:0];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      a = rand_big(17*B) % (mt << 1);
      b = rand_big(17*B) % (mt << 1);
      if (n == 0) begin a = (mt << 1) - 1; b = (mt << 1) - 1; end
      if (n == 1) begin a = 0; b = (mt << 1) - 1; end
      run_op(a, b, n[0], mt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
