// tb_ecm_unit_port: drives commands into two operand movers, one in adder
// order (interleaved) and one in multiplier order (A then B, then start), each
// against a model of the workspace read port (one cycle latency) and a model
// unit that answers done a random time after its operands and offers
// res_word = a fixed function of res_idx. Checks the order and values of the
// operand words, the start pulse, the written result words and addresses,
// and that busy covers the whole operation.
module tb_ecm_unit_port;
  import ecm_pkg::*;

  localparam int B = 10;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  word_t mem [1024];

  logic               cmd_valid [2];
  ucmd_t              cmd       [2];
  logic               busy      [2];
  maddr_t             rd_addr   [2];
  word_t              rd_data   [2];
  logic               wr_en     [2];
  maddr_t             wr_addr   [2];
  word_t              wr_data   [2];
  logic               op_valid  [2];
  logic               op_b      [2];
  logic [WORD_AW-1:0] op_idx    [2];
  word_t              op_word   [2];
  logic               op_sub    [2];
  logic               start     [2];
  logic               unit_done [2];
  logic [WORD_AW-1:0] res_idx   [2];
  word_t              res_word  [2];

  for (genvar u = 0; u < 2; u++) begin : g
    ecm_unit_port #(.B_WORDS(B), .INTERLEAVE(u == 0)) dut (
      .clk, .rst_n, .cmd_valid(cmd_valid[u]), .cmd(cmd[u]), .busy(busy[u]),
      .rd_addr(rd_addr[u]), .rd_data(rd_data[u]), .wr_en(wr_en[u]), .wr_addr(wr_addr[u]),
      .wr_data(wr_data[u]), .op_valid(op_valid[u]), .op_b(op_b[u]), .op_idx(op_idx[u]),
      .op_word(op_word[u]), .op_sub(op_sub[u]), .start(start[u]), .unit_done(unit_done[u]),
      .res_idx(res_idx[u]), .res_word(res_word[u])
    );
    always_ff @(posedge clk) rd_data[u] <= mem[rd_addr[u]];
    assign res_word[u] = word_t'(res_idx[u]) * 17'd1000 + 17'd7 + word_t'(u);
  end

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int u, input cell_t a, input cell_t b, input cell_t d, input logic sub);
    int nops, nstart, nwr, delay;
    word_t exp_w;
    nops = 0; nstart = 0; nwr = 0;
    @(negedge clk);
    cmd_valid[u] = 1;
    cmd[u] = '{sub: sub, dst: d, src_a: a, src_b: b};
    @(negedge clk);
    cmd_valid[u] = 0;
    cmd[u] = '0;
    delay = 3 + $urandom % 20;
    while (busy[u]) begin
      if (op_valid[u]) begin
        int w; logic isb;
        if (u == 0) begin isb = nops[0]; w = nops / 2; end
        else begin isb = (nops >= B); w = isb ? nops - B : nops; end
        exp_w = mem[{isb ? b : a, WORD_AW'(w)}];
        checks++;
        if (op_word[u] !== exp_w || op_b[u] !== isb || op_idx[u] !== WORD_AW'(w) || op_sub[u] !== sub) begin
          failures++;
          $display("unit %0d operand %0d wrong", u, nops);
        end
        nops++;
      end
      if (start[u]) nstart++;
      if (nops == 2*B && (u == 0 || nstart == 1)) begin
        if (delay == 0) begin unit_done[u] = 1; delay = -1; end
        else if (delay > 0) delay--;
      end
      if (wr_en[u]) begin
        checks++;
        if (wr_addr[u] !== {d, WORD_AW'(nwr)} || wr_data[u] !== word_t'(nwr) * 17'd1000 + 17'd7 + word_t'(u)) begin
          failures++;
          $display("unit %0d result word %0d wrong", u, nwr);
        end
        mem[wr_addr[u]] = wr_data[u];
        nwr++;
      end
      @(negedge clk);
      unit_done[u] = 0;
    end
    checks += 2;
    if (nops != 2*B || nwr != B) begin failures++; $display("unit %0d: %0d operands, %0d results", u, nops, nwr); end
    if (nstart != (u == 0 ? 0 : 1)) begin failures++; $display("unit %0d: %0d starts", u, nstart); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = word_t'($urandom);
    for (int u = 0; u < 2; u++) begin cmd_valid[u] = 0; cmd[u] = '0; unit_done[u] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++)
      run(n % 2, cell_t'($urandom), cell_t'($urandom), cell_t'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
