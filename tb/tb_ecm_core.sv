// tb_ecm_core: one core runs ECM phase 1 and phase 2 (B1 = 20, B2 = 500) on a
// random 151-bit modulus, curve constant and start point. The testbench loads
// the core as a host would (Montgomery representation, d = 1), runs it, and
// compares the 24-entry baby-step table, D*Q and the phase 2 product d with a
// reference computed in plain modular arithmetic. It also counts the
// controller's stalls on a busy unit, SYNC waits, swapped ladder steps, giant
// steps and table products, each of which must occur.
module tb_ecm_core;
  import ecm_pkg::*;
  import ecm_tb_pkg::*;

  localparam int B   = 10;
  localparam int B1V = 20;
  localparam int B2V = 500;
  logic clk = 0, rst_n = 0;
  logic host_we, start, busy, done;
  logic [MEM_AW:0] host_addr;
  word_t host_wdata, host_rdata;
  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_sync = 0, n_swap = 0, n_giant = 0, n_prod = 0;

  ecm_core #(.B_WORDS(B), .B1(B1V), .B2(B2V)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.running && !dut.issue && dut.instr.op inside {OP_ADD, OP_SUB, OP_MUL1, OP_MUL2}) n_stall++;
    if (dut.running && !dut.issue && dut.instr.op == OP_SYNC) n_sync++;
    if (dut.running && dut.issue && dut.instr.op == OP_LOOP && dut.swap1) n_swap++;
    if (dut.running && dut.issue && dut.instr.op == OP_TOGGLE) n_giant++;
    if (dut.running && dut.issue && dut.instr.op == OP_JNEXT && dut.j_found) n_prod++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (timeout)", checks, failures);
    $finish;
  end

  task automatic wr_cell(input int cidx, input big_t v);
    for (int j = 0; j < CELL_WORDS; j++) begin
      @(negedge clk);
      host_we = 1; host_addr = {1'b0, cell_t'(cidx), WORD_AW'(j)};
      host_wdata = (j < B) ? v[j*W +: W] : '0;
    end
    @(negedge clk); host_we = 0;
  endtask

  task automatic rd_cell(input int cidx, output big_t v);
    v = '0;
    for (int j = 0; j < B; j++) begin
      @(negedge clk);
      host_addr = {1'b0, cell_t'(cidx), WORD_AW'(j)};
      @(negedge clk);
      v[j*W +: W] = host_rdata;
    end
  endtask

  task automatic check_cell(input int cidx, input big_t refv, input big_t m, input big_t mt, input big_t r);
    big_t got;
    rd_cell(cidx, got);
    checks++;
    if (got >= (mt << 1) || (got % m) != mulmod(refv, r, m)) begin
      failures++;
      $display("FAIL cell %0d got=%h", cidx, got);
    end
  endtask

  initial begin
    big_t m, mt, r, px, a24, d;
    pt_t q, dq;
    pt_t tbl [24];
    int nprod;
    host_we = 0; start = 0; host_addr = '0; host_wdata = '0;
    mt  = make_modulus(17*B - 19, m);
    r   = pow2mod(17*B, mt);
    px  = rand_big(160) % m;
    a24 = rand_big(160) % m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < CELL_WORDS; j++) begin
      @(negedge clk);
      host_we = 1; host_addr = {1'b1, 6'd0, WORD_AW'(j)}; host_wdata = (j < B) ? mt[j*W +: W] : '0;
    end
    @(negedge clk); host_we = 0;
    wr_cell(0, r);                       // R0 = (1:0)
    wr_cell(1, 0);
    wr_cell(2, mulmod(px, r, mt));       // R1 = P
    wr_cell(3, r);
    wr_cell(52, mulmod(px, r, mt));      // base point P
    wr_cell(53, r);
    wr_cell(54, r);                      // d = 1
    wr_cell(55, mulmod(a24, r, mt));
    ecm_ref(px, a24, m, B1V, B2V, q, tbl, dq, d, nprod);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    $display("phase 1 + 2 took %0d cycles, %0d table products", cyc, nprod);
    for (int s = 0; s < 24; s++) begin
      check_cell(2*s,     tbl[s].x, m, mt, r);
      check_cell(2*s + 1, tbl[s].z, m, mt, r);
    end
    check_cell(52, dq.x, m, mt, r);
    check_cell(53, dq.z, m, mt, r);
    check_cell(54, d, m, mt, r);
    checks += 6;
    if (n_stall == 0) begin failures++; $display("no unit stall seen"); end
    if (n_sync == 0)  begin failures++; $display("no SYNC wait seen"); end
    if (n_swap == 0)  begin failures++; $display("no swapped ladder step seen"); end
    if (n_giant != (B2V + 103) / 210) begin failures++; $display("giant steps %0d", n_giant); end
    if (n_prod != nprod) begin failures++; $display("table products %0d, expected %0d", n_prod, nprod); end
    if (nprod == 0) begin failures++; $display("no table product"); end
    $display("stall cycles %0d, sync wait cycles %0d, swapped steps %0d, giant steps %0d, products %0d",
             n_stall, n_sync, n_swap, n_giant, n_prod);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
