// tb_ecm_modulus_reg: writes random moduli word by word and checks the
// parallel output after each write, including that other words keep their
// value and that reset clears the register.
module tb_ecm_modulus_reg;
  import ecm_pkg::*;
  logic clk = 0, rst_n = 1, we;
  logic [WORD_AW-1:0] idx;
  word_t wdata;
  logic [W*CELL_WORDS-1:0] mod_t, model;
  int checks = 0, failures = 0;

  ecm_modulus_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; idx = '0; wdata = '0;
    #1 rst_n = 0;
    #1;
    checks++;
    if (mod_t != '0) failures++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      idx = WORD_AW'($urandom);
      wdata = word_t'($urandom);
      if (we) model[idx*W +: W] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (mod_t !== model) begin failures++; $display("mismatch after write %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
