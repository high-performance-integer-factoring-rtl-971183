// ecm_unit_port: operand and result mover between the workspace and one
// arithmetic unit (the "Input" blocks of the block diagram).
//
// On a command it reads the b words of cell src_a and of cell src_b through
// the unit's own workspace read port and hands them to the unit. For the adder
// (INTERLEAVE = 1) the words go out as a0, b0, a1, b1, ..., the order the adder
// consumes them in; for a multiplier (INTERLEAVE = 0) all of A, then all of B,
// into its operand buffers, followed by a start pulse. When the unit reports
// done, the b result words are written to cell dst through the unit's write
// port. busy is high from the cycle after cmd_valid until the last result word
// has been written.
//
// Timing: 2b read cycles, one cycle for the read latency, one start cycle
// (multipliers only), the unit's own latency, then b write cycles. The
// document does not describe these blocks beyond their place in the diagram;
// the sequence is this design's own. The data words themselves pass straight
// through (op_word is the workspace read data, wr_data the unit's result
// word); the port only generates addresses, indices and strobes.
module ecm_unit_port
  import ecm_pkg::*;
#(
  parameter int B_WORDS    = 10,
  parameter bit INTERLEAVE = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  // command from the controller
  input  logic               cmd_valid,
  input  ucmd_t              cmd,
  output logic               busy,
  // workspace side
  output maddr_t             rd_addr,
  input  word_t              rd_data,
  output logic               wr_en,
  output maddr_t             wr_addr,
  output word_t              wr_data,
  // unit side
  output logic               op_valid,
  output logic               op_b,       // word belongs to operand B
  output logic [WORD_AW-1:0] op_idx,
  output word_t              op_word,
  output logic               op_sub,
  output logic               start,
  input  logic               unit_done,
  output logic [WORD_AW-1:0] res_idx,
  input  word_t              res_word
);

  localparam int CW = $clog2(2 * B_WORDS + 1);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_DRAIN, S_START, S_WAIT, S_WRITE} state_e;
  state_e        state;
  ucmd_t         cmd_q;
  logic [CW-1:0] cnt;
  logic          rd_b, rd_b_q, rd_v_q;
  logic [WORD_AW-1:0] rd_idx, rd_idx_q;

  // which word the read counter points at
  always_comb begin
    if (INTERLEAVE) begin
      rd_b   = cnt[0];
      rd_idx = WORD_AW'(cnt >> 1);
    end else begin
      rd_b   = (cnt >= CW'(B_WORDS));
      rd_idx = rd_b ? WORD_AW'(cnt - CW'(B_WORDS)) : WORD_AW'(cnt);
    end
    rd_addr = {rd_b ? cmd_q.src_b : cmd_q.src_a, rd_idx};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cmd_q    <= '0;
      cnt      <= '0;
      rd_v_q   <= 1'b0;
      rd_b_q   <= 1'b0;
      rd_idx_q <= '0;
    end else begin
      rd_v_q <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd_q <= cmd;
          cnt   <= '0;
          state <= S_READ;
        end
        S_READ: begin
          rd_v_q   <= 1'b1;
          rd_b_q   <= rd_b;
          rd_idx_q <= rd_idx;
          if (cnt == CW'(2 * B_WORDS - 1)) begin
            cnt   <= '0;
            state <= S_DRAIN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DRAIN: state <= INTERLEAVE ? S_WAIT : S_START;
        S_START: state <= S_WAIT;
        S_WAIT:  if (unit_done) state <= S_WRITE;
        S_WRITE: begin
          if (cnt == CW'(B_WORDS - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign op_valid = rd_v_q;
  assign op_b     = rd_b_q;
  assign op_idx   = rd_idx_q;
  assign op_word  = rd_data;
  assign op_sub   = cmd_q.sub;
  assign start    = (state == S_START);
  assign res_idx  = WORD_AW'(cnt);
  assign wr_en    = (state == S_WRITE);
  assign wr_addr  = {cmd_q.dst, WORD_AW'(cnt)};
  assign wr_data  = res_word;

endmodule
