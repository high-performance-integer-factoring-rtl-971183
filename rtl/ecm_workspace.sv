// ecm_workspace: the workspace memory of one ECM core.
//
// 64 cells of 16 words of 17 bits (a cell is 272 bits, two cells hold the X and
// Z coordinates of one point). Addresses are {cell, word}. Each arithmetic unit
// has its own 17-bit read port and its own 17-bit write port, so the three
// units move operands and results at the same time; a fourth port serves the
// host (load of curve data, read-out of results).
//
// Timing: reads are synchronous, data appears the cycle after the address, as
// in a block RAM. Writes take effect at the clock edge. If two ports write the
// same word in one cycle the higher-numbered unit port wins, and the host port
// loses to all; the program never does this.
//
// Cell count, cell size and word width follow the document; the port count is
// read from its block diagram (one 17-bit path into and one out of each unit).
module ecm_workspace
  import ecm_pkg::*;
#(
  parameter int N_PORTS = 3
) (
  input  logic   clk,
  // unit ports
  input  maddr_t rd_addr [N_PORTS],
  output word_t  rd_data [N_PORTS],
  input  logic   wr_en   [N_PORTS],
  input  maddr_t wr_addr [N_PORTS],
  input  word_t  wr_data [N_PORTS],
  // host port
  input  logic   h_we,
  input  maddr_t h_addr,
  input  word_t  h_wdata,
  output word_t  h_rdata
);

  word_t mem [N_CELLS*CELL_WORDS];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    for (int p = 0; p < N_PORTS; p++)
      if (wr_en[p]) mem[wr_addr[p]] <= wr_data[p];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) rd_data[p] <= mem[rd_addr[p]];
    h_rdata <= mem[h_addr];
  end

endmodule
