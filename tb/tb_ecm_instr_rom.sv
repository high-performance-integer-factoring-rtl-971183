// tb_ecm_instr_rom: checks the ROM at the document's bounds B1 = 960,
// B2 = 57000: every bit of the 1374-bit scalar, every phase 2 mask against
// primes found here by trial division, and the shape of the program - 11
// Montgomery multiplications in the phase 1 ladder step ending in a LOOP back
// to 0, a table product body of three multiplications, and an END.
module tb_ecm_instr_rom;
  import ecm_pkg::*;
  import ecm_tb_pkg::*;

  localparam int B1V = 960, B2V = 57000;
  logic [PC_W-1:0] pc;
  instr_t instr;
  logic [10:0] bit_idx;
  logic k_bit;
  logic [8:0] m_idx;
  mask_t mask;
  int checks = 0, failures = 0;

  ecm_instr_rom #(.B1(B1V), .B2(B2V)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1535:0] k;
    int kb, muls, js [24], ns, n_end, n_jnext;
    bit loop_seen;
    k = scalar(B1V);
    kb = 0;
    for (int i = 0; i < 1536; i++) if (k[i]) kb = i + 1;
    checks++;
    if (kb != 1374) begin failures++; $display("scalar has %0d bits", kb); end
    for (int i = 0; i < kb; i++) begin
      bit_idx = 11'(i);
      #1;
      checks++;
      if (k_bit !== k[i]) begin failures++; $display("scalar bit %0d", i); end
    end
    ns = 0;
    for (int j = 1; j < 105; j += 2)
      if (j % 3 != 0 && j % 5 != 0 && j % 7 != 0) js[ns++] = j;
    for (int m = 0; m <= (B2V + 103) / 210 + 2; m++) begin
      mask_t e;
      e = '0;
      for (int s = 0; s < 24; s++) begin
        int lo, hi;
        lo = m * 210 - js[s];
        hi = m * 210 + js[s];
        if ((lo > B1V && lo <= B2V && prime(lo)) || (hi > B1V && hi <= B2V && prime(hi))) e[s] = 1;
      end
      m_idx = 9'(m);
      #1;
      checks++;
      if (mask !== e) begin failures++; $display("mask %0d: %h expected %h", m, mask, e); end
    end
    // phase 1 step
    muls = 0;
    loop_seen = 0;
    for (int p = 0; p < 40 && !loop_seen; p++) begin
      pc = PC_W'(p);
      #1;
      if (instr.op inside {OP_MUL1, OP_MUL2}) muls++;
      if (instr.op == OP_LOOP) begin
        loop_seen = 1;
        checks++;
        if ({instr.src_a, instr.src_b} != '0) begin failures++; $display("LOOP target"); end
      end
    end
    checks += 2;
    if (!loop_seen) begin failures++; $display("no LOOP"); end
    if (muls != 11) begin failures++; $display("%0d multiplications per ladder step", muls); end
    n_end = 0; n_jnext = 0;
    for (int p = 0; p < PROG_LEN; p++) begin
      pc = PC_W'(p);
      #1;
      if (instr.op == OP_END) n_end++;
      if (instr.op == OP_JNEXT) n_jnext++;
    end
    checks += 2;
    if (n_end == 0) begin failures++; $display("no END"); end
    if (n_jnext != 1) begin failures++; $display("%0d JNEXT", n_jnext); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
