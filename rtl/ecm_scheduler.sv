// ecm_scheduler: the data request scheduler between the host interface and the
// ECM cores of one FPGA.
//
// Every core raises a request line when it has finished its program (24 lines
// for 24 cores, the 24-bit path of the document's system figure); the host sees
// them as req_pending, reads the results, loads new curve data and restarts
// the core, which clears its line. Host accesses travel to the cores over a
// shared bus with PIPE register stages (the registers the figure draws on the
// bus to keep long wires off the critical path); read data comes back through
// the same number of stages.
//
// Host port: one access per cycle at most; h_core selects the core. A read
// (h_valid && !h_we && !h_start) returns its word on h_rvalid/h_rdata
// 2*PIPE+1 cycles later (PIPE out, one cycle core read latency, PIPE back).
// h_start restarts the selected core instead of accessing memory.
// The request lines are read from the figure; the bus protocol and the pipeline
// depth are this design's own.
module ecm_scheduler
  import ecm_pkg::*;
#(
  parameter int N_CORES = 24,
  parameter int PIPE    = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host side
  input  logic                         h_valid,
  input  logic [$clog2(N_CORES)-1:0]   h_core,
  input  logic                         h_we,
  input  logic                         h_start,
  input  logic [MEM_AW:0]              h_addr,
  input  word_t                        h_wdata,
  output logic                         h_rvalid,
  output word_t                        h_rdata,
  output logic [N_CORES-1:0]           req_pending,
  // core side
  output logic [N_CORES-1:0]           c_we,
  output logic [N_CORES-1:0]           c_start,
  output logic [MEM_AW:0]              c_addr,
  output word_t                        c_wdata,
  input  word_t                        c_rdata [N_CORES],
  input  logic [N_CORES-1:0]           c_done
);

  localparam int CB = $clog2(N_CORES);

  typedef struct packed {
    logic           valid;
    logic [CB-1:0]  core;
    logic           we;
    logic           start;
    logic [MEM_AW:0] addr;
    word_t          wdata;
  } req_t;

  req_t          stage [PIPE+1];
  logic          rd_v  [PIPE+1];
  word_t         rd_d  [PIPE+1];
  logic [CB-1:0] rd_core;
  logic          rd_issued;

  assign stage[0] = '{valid: h_valid, core: h_core, we: h_we, start: h_start,
                      addr: h_addr, wdata: h_wdata};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= PIPE; s++) stage[s] <= '0;
    end else begin
      for (int s = 1; s <= PIPE; s++) stage[s] <= stage[s-1];
    end
  end

  // decode at the end of the outgoing pipeline
  always_comb begin
    c_we    = '0;
    c_start = '0;
    c_addr  = stage[PIPE].addr;
    c_wdata = stage[PIPE].wdata;
    if (stage[PIPE].valid) begin
      if (stage[PIPE].start)   c_start[stage[PIPE].core] = 1'b1;
      else if (stage[PIPE].we) c_we[stage[PIPE].core]    = 1'b1;
    end
  end

  // read return: the core answers one cycle after the address
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_issued <= 1'b0;
      rd_core   <= '0;
    end else begin
      rd_issued <= stage[PIPE].valid && !stage[PIPE].we && !stage[PIPE].start;
      rd_core   <= stage[PIPE].core;
    end
  end

  assign rd_v[0] = rd_issued;
  assign rd_d[0] = c_rdata[rd_core];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= PIPE; s++) begin
        rd_v[s] <= 1'b0;
        rd_d[s] <= '0;
      end
    end else begin
      for (int s = 1; s <= PIPE; s++) begin
        rd_v[s] <= rd_v[s-1];
        rd_d[s] <= rd_d[s-1];
      end
    end
  end

  assign h_rvalid = rd_v[PIPE];
  assign h_rdata  = rd_d[PIPE];

  // request lines: set by a finished core, cleared by its restart
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_pending <= '0;
    else        req_pending <= (req_pending | c_done) & ~c_start;
  end

endmodule
