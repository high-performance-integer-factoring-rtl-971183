// ecm_core: one ECM unit - controller, workspace memory, one modular
// adder/subtracter and two Montgomery multipliers, running ECM phase 1 and
// phase 2 on one curve.
//
// The host loads the scaled modulus Mt into the modulus register and the
// curve constant, start point and d = 1 into the workspace (see
// ecm_instr_rom for the cell map), then pulses start. The controller runs the
// program of the instruction ROM: it hands each ADD/SUB to the adder and each
// MUL1/MUL2 to multiplier 1 or 2 and moves on as soon as the unit has taken
// the command, so the three units work at the same time. It stalls while the
// addressed unit is still busy, and a SYNC waits until all units are idle (the
// program places SYNCs where a result is needed).
// Loop and address state:
//  * LOOP steps to the next bit of the phase 1 scalar and jumps back while
//    bits remain; while the current bit is 1, cells 0-1 and 2-3 trade places
//    in every address issued (the Montgomery ladder's conditional swap).
//  * JNEXT moves to the next table entry j flagged in the mask of the current
//    giant step m and jumps to the product body; operand codes 64/65 then
//    address that entry's X/Z cells (2j, 2j+1). MNEXT moves to the next giant
//    step, TOGGLE swaps cells 48-49 with 50-51 (R and R').
//  * END raises done for one cycle.
//
// Host port: host_addr = {sel, cell, word}; sel = 1 writes word `word` of the
// modulus register, sel = 0 addresses the workspace. Reads return the word
// the cycle after host_addr is presented. start is ignored while busy.
//
// The units, their connection to the workspace and their latencies follow the
// document's block diagram, and the phase 2 data follow its workspace figure;
// the controller, its instruction set and the host port are this design's
// own, since the document only names them.
module ecm_core
  import ecm_pkg::*;
#(
  parameter int B_WORDS = 10,
  parameter int B1      = 960,
  parameter int B2      = 57000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                host_we,
  input  logic [MEM_AW:0]     host_addr,
  input  word_t               host_wdata,
  output word_t               host_rdata,
  input  logic                start,
  output logic                busy,
  output logic                done
);

  localparam int KBITS = ecm_scalar_bits(B1);
  localparam int KW    = $clog2(KBITS);
  localparam int M_MAX = ecm_m_max(B2);
  localparam int MW    = $clog2(M_LIM);
  localparam int SW    = $clog2(N_J);

  // ---------------- controller ----------------
  logic [PC_W-1:0] pc;
  logic [KW-1:0]   bit_idx;
  logic            swap1;      // phase 1: R0 and R1 (cells 0-3) swapped
  logic            swap2;      // phase 2: R and R' (cells 48-51) swapped
  logic [MW-1:0]   m_idx;      // phase 2 giant step
  logic [SW-1:0]   j_cur;      // phase 2 table entry
  logic            j_valid;
  instr_t          instr;
  logic            k_bit;
  mask_t           mask;
  logic            running;
  logic [PC_W-1:0] target;

  // the scalar table is read at the next bit, the one a LOOP moves to
  logic [KW-1:0] bit_next;
  assign bit_next = (bit_idx == '0) ? '0 : bit_idx - 1'b1;

  ecm_instr_rom #(.B1(B1), .B2(B2), .KBITS(KBITS), .M_MAX(M_MAX)) u_rom (
    .pc(pc), .instr(instr), .bit_idx(bit_next), .k_bit(k_bit), .m_idx(m_idx), .mask(mask)
  );

  assign target = PC_W'({instr.src_a, instr.src_b});

  function automatic cell_t map_cell(opnd_t o, logic sw1, logic sw2, logic [SW-1:0] jc);
    cell_t c;
    if (o[CELL_AW]) begin
      c = {jc, o[0]};                       // table entry: cells 2j, 2j+1
    end else begin
      c = o[CELL_AW-1:0];
      if (sw1 && c < 6'd4) c = c ^ 6'd2;
      if (sw2 && c >= 6'd48 && c < 6'd52) c = c ^ 6'd2;
    end
    return c;
  endfunction

  // next flagged table entry after the current one
  logic          j_found;
  logic [SW-1:0] j_next;
  always_comb begin
    j_found = 1'b0;
    j_next  = '0;
    for (int s = N_J - 1; s >= 0; s--)
      if (mask[s] && (!j_valid || SW'(s) > j_cur)) begin
        j_found = 1'b1;
        j_next  = SW'(s);
      end
  end

  // unit 0: adder, unit 1: multiplier 1, unit 2: multiplier 2
  logic  cmd_valid [3];
  logic  ubusy     [3];
  ucmd_t cmd;
  logic  all_idle;

  assign cmd.sub   = (instr.op == OP_SUB);
  assign cmd.dst   = map_cell(instr.dst,   swap1, swap2, j_cur);
  assign cmd.src_a = map_cell(instr.src_a, swap1, swap2, j_cur);
  assign cmd.src_b = map_cell(instr.src_b, swap1, swap2, j_cur);
  assign all_idle  = !ubusy[0] && !ubusy[1] && !ubusy[2];

  logic issue;   // current instruction can complete this cycle
  always_comb begin
    issue = 1'b0;
    for (int u = 0; u < 3; u++) cmd_valid[u] = 1'b0;
    if (running) begin
      unique case (instr.op)
        OP_ADD, OP_SUB: begin issue = !ubusy[0]; cmd_valid[0] = issue; end
        OP_MUL1:        begin issue = !ubusy[1]; cmd_valid[1] = issue; end
        OP_MUL2:        begin issue = !ubusy[2]; cmd_valid[2] = issue; end
        OP_SYNC:        issue = all_idle;
        default:        issue = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      bit_idx <= '0;
      swap1   <= 1'b0;
      swap2   <= 1'b0;
      m_idx   <= '0;
      j_cur   <= '0;
      j_valid <= 1'b0;
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          pc      <= '0;
          bit_idx <= KW'(KBITS - 1);
          swap1   <= 1'b1;   // the top bit of k is 1
          swap2   <= 1'b0;
          m_idx   <= MW'(1);
          j_valid <= 1'b0;
        end
      end else if (issue) begin
        pc <= pc + 1'b1;
        unique case (instr.op)
          OP_LOOP: begin
            if (bit_idx != '0) begin
              bit_idx <= bit_idx - 1'b1;
              swap1   <= k_bit;
              pc      <= target;
            end else begin
              swap1   <= 1'b0;   // ladder done: Q = k*P sits in cells 0/1
            end
          end
          OP_JNEXT: begin
            if (j_found) begin
              j_cur   <= j_next;
              j_valid <= 1'b1;
              pc      <= target;
            end
          end
          OP_MNEXT: begin
            j_valid <= 1'b0;
            if (int'(m_idx) < M_MAX) begin
              m_idx <= m_idx + 1'b1;
              pc    <= target;
            end
          end
          OP_TOGGLE: swap2 <= !swap2;
          OP_JMP:    pc <= target;
          OP_END: begin
            running <= 1'b0;
            done    <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  assign busy = running;

  // ---------------- datapath ----------------
  logic [W*CELL_WORDS-1:0] mod_t;

  ecm_modulus_reg u_mod (
    .clk, .rst_n,
    .we   (host_we && host_addr[MEM_AW]),
    .idx  (host_addr[WORD_AW-1:0]),
    .wdata(host_wdata),
    .mod_t(mod_t)
  );

  maddr_t rd_addr [3];
  word_t  rd_data [3];
  logic   wr_en   [3];
  maddr_t wr_addr [3];
  word_t  wr_data [3];

  ecm_workspace #(.N_PORTS(3)) u_ws (
    .clk,
    .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .h_we   (host_we && !host_addr[MEM_AW]),
    .h_addr (host_addr[MEM_AW-1:0]),
    .h_wdata(host_wdata),
    .h_rdata(host_rdata)
  );

  logic               op_valid [3];
  logic               op_b     [3];
  logic [WORD_AW-1:0] op_idx   [3];
  word_t              op_word  [3];
  logic               op_sub   [3];
  logic               ustart   [3];
  logic               udone    [3];
  logic [WORD_AW-1:0] res_idx  [3];
  word_t              res_word [3];
  logic               unit_busy[3];

  for (genvar u = 0; u < 3; u++) begin : g_port
    ecm_unit_port #(.B_WORDS(B_WORDS), .INTERLEAVE(u == 0)) u_port (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[u]), .cmd(cmd), .busy(ubusy[u]),
      .rd_addr(rd_addr[u]), .rd_data(rd_data[u]),
      .wr_en(wr_en[u]), .wr_addr(wr_addr[u]), .wr_data(wr_data[u]),
      .op_valid(op_valid[u]), .op_b(op_b[u]), .op_idx(op_idx[u]), .op_word(op_word[u]),
      .op_sub(op_sub[u]), .start(ustart[u]), .unit_done(udone[u]),
      .res_idx(res_idx[u]), .res_word(res_word[u])
    );
  end

  ecm_maddsub #(.B_WORDS(B_WORDS)) u_addsub (
    .clk, .rst_n,
    .in_valid(op_valid[0]), .in_word(op_word[0]), .in_sub(op_sub[0]),
    .mod_t(mod_t), .res_idx(res_idx[0]), .res_word(res_word[0]),
    .busy(unit_busy[0]), .done(udone[0])
  );

  for (genvar u = 1; u < 3; u++) begin : g_mul
    ecm_mmul #(.B_WORDS(B_WORDS)) u_mmul (
      .clk, .rst_n,
      .ld_we(op_valid[u]), .ld_b(op_b[u]), .ld_idx(op_idx[u]), .ld_word(op_word[u]),
      .mod_t(mod_t), .start(ustart[u]),
      .res_idx(res_idx[u]), .res_word(res_word[u]),
      .busy(unit_busy[u]), .done(udone[u])
    );
  end

  // a unit is only started, or fed a new operation, when it is idle
  for (genvar u = 1; u < 3; u++) begin : g_chk
    a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) ustart[u] |-> !unit_busy[u]);
  end
  a_add_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               (op_valid[0] && !unit_busy[0]) |-> !udone[0]);

endmodule
