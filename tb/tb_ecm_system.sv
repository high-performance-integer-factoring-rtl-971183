// tb_ecm_system: end-to-end run of the full engine at its default size - 24
// cores, 151-bit moduli, B1 = 960 (1374-bit scalar), B2 = 57000. Every core
// gets its own random modulus, curve constant and start point through the
// scheduler, all cores run phase 1 and phase 2 at once, and each core's Q = k*P
// and phase 2 product d are read back through the scheduler and compared with
// a reference computed here. Counts the mechanisms the design relies on:
// stalls on a busy unit, SYNC waits, swapped ladder steps, giant steps, table
// products, request lines and pipelined reads; each must occur.
module tb_ecm_system;
  import ecm_pkg::*;
  import ecm_tb_pkg::*;

  localparam int NC  = 24;
  localparam int B   = 10;
  localparam int B1V = 960;
  localparam int B2V = 57000;
  localparam int CB  = $clog2(NC);

  logic clk = 0, rst_n = 0;
  logic h_valid, h_we, h_start, h_rvalid;
  logic [CB-1:0] h_core;
  logic [MEM_AW:0] h_addr;
  word_t h_wdata, h_rdata;
  logic [NC-1:0] req_pending, core_busy;
  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_sync = 0, n_swap = 0, n_req = 0, n_rd = 0, n_giant = 0, n_prod = 0;

  ecm_system dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.g_core[0].u_core.running && !dut.g_core[0].u_core.issue &&
        dut.g_core[0].u_core.instr.op inside {OP_ADD, OP_SUB, OP_MUL1, OP_MUL2}) n_stall++;
    if (dut.g_core[0].u_core.running && !dut.g_core[0].u_core.issue &&
        dut.g_core[0].u_core.instr.op == OP_SYNC) n_sync++;
    if (dut.g_core[0].u_core.running && dut.g_core[0].u_core.issue &&
        dut.g_core[0].u_core.instr.op == OP_LOOP && dut.g_core[0].u_core.swap1) n_swap++;
    if (dut.g_core[0].u_core.running && dut.g_core[0].u_core.issue &&
        dut.g_core[0].u_core.instr.op == OP_TOGGLE) n_giant++;
    if (dut.g_core[0].u_core.running && dut.g_core[0].u_core.issue &&
        dut.g_core[0].u_core.instr.op == OP_JNEXT && dut.g_core[0].u_core.j_found) n_prod++;
    if (h_rvalid) n_rd++;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (timeout)", checks, failures);
    $finish;
  end

  task automatic host_wr(input int core, input logic [MEM_AW:0] addr, input word_t d);
    @(negedge clk);
    h_valid = 1; h_we = 1; h_start = 0; h_core = CB'(core); h_addr = addr; h_wdata = d;
    @(negedge clk);
    h_valid = 0; h_we = 0;
  endtask

  task automatic host_rd(input int core, input logic [MEM_AW:0] addr, output word_t d);
    int lat;
    @(negedge clk);
    h_valid = 1; h_we = 0; h_start = 0; h_core = CB'(core); h_addr = addr;
    @(negedge clk);
    h_valid = 0;
    lat = 1;
    while (!h_rvalid) begin @(negedge clk); lat++; end
    d = h_rdata;
    if (lat != 2*2 + 1) begin failures++; $display("read latency %0d", lat); end
  endtask

  task automatic wr_cell(input int core, input int cidx, input big_t v);
    for (int j = 0; j < B; j++) host_wr(core, {1'b0, cell_t'(cidx), WORD_AW'(j)}, v[j*W +: W]);
  endtask

  big_t m [NC], mt [NC], r [NC], px [NC], a24 [NC];
  big_t ref_c [NC][3];
  int   nprod [NC];

  initial begin
    word_t w;
    big_t got;
    h_valid = 0; h_we = 0; h_start = 0; h_core = '0; h_addr = '0; h_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) begin
      mt[c]  = make_modulus(17*B - 19, m[c]);
      r[c]   = pow2mod(17*B, mt[c]);
      px[c]  = rand_big(160) % m[c];
      a24[c] = rand_big(160) % m[c];
      for (int j = 0; j < CELL_WORDS; j++)
        host_wr(c, {1'b1, 6'd0, WORD_AW'(j)}, (j < B) ? mt[c][j*W +: W] : '0);
      wr_cell(c, 0, r[c]);
      wr_cell(c, 1, 0);
      wr_cell(c, 2, mulmod(px[c], r[c], mt[c]));
      wr_cell(c, 3, r[c]);
      wr_cell(c, 52, mulmod(px[c], r[c], mt[c]));
      wr_cell(c, 53, r[c]);
      wr_cell(c, 54, r[c]);
      wr_cell(c, 55, mulmod(a24[c], r[c], mt[c]));
    end
    // start all cores
    for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      h_valid = 1; h_we = 0; h_start = 1; h_core = CB'(c);
    end
    @(negedge clk);
    h_valid = 0; h_start = 0;
    // reference runs while the hardware works
    for (int c = 0; c < NC; c++) begin
      pt_t q, dq;
      pt_t tbl [24];
      big_t d;
      ecm_ref(px[c], a24[c], m[c], B1V, B2V, q, tbl, dq, d, nprod[c]);
      ref_c[c][0] = q.x; ref_c[c][1] = q.z; ref_c[c][2] = d;
    end
    while (req_pending != {NC{1'b1}}) begin
      @(negedge clk);
      if (req_pending != '0 && n_req == 0) n_req = 1;
    end
    $display("all %0d cores finished phase 1 and 2 at cycle %0d (%0d table products on core 0)",
             NC, cyc, nprod[0]);
    for (int c = 0; c < NC; c++)
      for (int q = 0; q < 3; q++) begin
        got = '0;
        for (int j = 0; j < B; j++) begin
          host_rd(c, {1'b0, cell_t'((q == 2) ? 54 : q), WORD_AW'(j)}, w);
          got[j*W +: W] = w;
        end
        checks++;
        if (got >= (mt[c] << 1) || (got % m[c]) != mulmod(ref_c[c][q], r[c], m[c])) begin
          failures++;
          $display("FAIL core %0d value %0d", c, q);
        end
      end
    checks += 7;
    if (n_stall == 0) begin failures++; $display("no unit stall"); end
    if (n_sync == 0)  begin failures++; $display("no SYNC wait"); end
    if (n_swap == 0)  begin failures++; $display("no swapped step"); end
    if (n_req == 0)   begin failures++; $display("no request line"); end
    if (n_rd == 0)    begin failures++; $display("no pipelined read"); end
    if (n_giant != (B2V + 103) / 210) begin failures++; $display("giant steps %0d", n_giant); end
    if (n_prod != nprod[0]) begin failures++; $display("products %0d, expected %0d", n_prod, nprod[0]); end
    $display("core 0: stall cycles %0d, sync wait cycles %0d, swapped steps %0d, giant steps %0d, products %0d; reads %0d",
             n_stall, n_sync, n_swap, n_giant, n_prod, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
