// tb_ecm_scheduler: 24 model cores (a word array each, answering reads one
// cycle after the address) behind the scheduler. Random writes and reads to
// random cores, with back-to-back accesses, check routing and read data and
// the 2*PIPE+1 read latency; start pulses must reach exactly the addressed
// core, and request lines must rise with a core's done and fall with its
// restart.
module tb_ecm_scheduler;
  import ecm_pkg::*;

  localparam int NC = 24, PIPE = 2;
  logic clk = 0, rst_n = 0;
  logic h_valid, h_we, h_start, h_rvalid;
  logic [4:0] h_core;
  logic [MEM_AW:0] h_addr;
  word_t h_wdata, h_rdata;
  logic [NC-1:0] req_pending, c_we, c_start, c_done;
  logic [MEM_AW:0] c_addr;
  word_t c_wdata;
  word_t c_rdata [NC];
  word_t cmem [NC][64];
  word_t model [NC][64];
  int checks = 0, failures = 0, cyc = 0;
  int starts [NC];

  ecm_scheduler #(.N_CORES(NC), .PIPE(PIPE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar c = 0; c < NC; c++) begin : g_core
    always_ff @(posedge clk) begin
      if (c_we[c]) cmem[c][c_addr[5:0]] <= c_wdata;
      c_rdata[c] <= cmem[c][c_addr[5:0]];
      if (c_start[c]) starts[c] <= starts[c] + 1;
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read checker: expected values queue up in issue order
  word_t exp_q [$];
  int    t_q [$];
  always @(negedge clk) if (rst_n && h_rvalid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected read data"); end
    else begin
      word_t e; int t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      if (h_rdata !== e) begin failures++; $display("read data %h expected %h", h_rdata, e); end
      checks++;
      if (cyc - t != 2 * PIPE + 1) begin failures++; $display("read latency %0d", cyc - t); end
    end
  end

  initial begin
    h_valid = 0; h_we = 0; h_start = 0; h_core = '0; h_addr = '0; h_wdata = '0; c_done = '0;
    for (int c = 0; c < NC; c++) begin
      starts[c] = 0;
      for (int a = 0; a < 64; a++) begin cmem[c][a] = '0; model[c][a] = '0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // writes, back to back
    for (int n = 0; n < 2000; n++) begin
      int c, a;
      c = $urandom % NC; a = $urandom % 64;
      h_valid = 1; h_we = 1; h_start = 0; h_core = 5'(c); h_addr = (MEM_AW+1)'(a);
      h_wdata = word_t'($urandom);
      model[c][a] = h_wdata;
      @(negedge clk);
    end
    h_valid = 0; h_we = 0;
    repeat (2 * PIPE + 2) @(negedge clk);
    // reads, back to back
    for (int n = 0; n < 2000; n++) begin
      int c, a;
      c = $urandom % NC; a = $urandom % 64;
      h_valid = 1; h_we = 0; h_start = 0; h_core = 5'(c); h_addr = (MEM_AW+1)'(a);
      exp_q.push_back(model[c][a]);
      t_q.push_back(cyc);
      @(negedge clk);
    end
    h_valid = 0;
    repeat (2 * PIPE + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d reads unanswered", exp_q.size()); end
    // request lines and starts
    c_done = 24'h00_8421;
    @(negedge clk);
    c_done = '0;
    @(negedge clk);
    checks++;
    if (req_pending !== 24'h00_8421) begin failures++; $display("req %h", req_pending); end
    h_valid = 1; h_start = 1; h_core = 5'd5;
    @(negedge clk);
    h_valid = 0; h_start = 0;
    repeat (PIPE + 2) @(negedge clk);
    checks += 2;
    if (req_pending !== 24'h00_8401) begin failures++; $display("req after restart %h", req_pending); end
    for (int c = 0; c < NC; c++)
      if (starts[c] != (c == 5 ? 1 : 0)) begin failures++; $display("core %0d started %0d times", c, starts[c]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
