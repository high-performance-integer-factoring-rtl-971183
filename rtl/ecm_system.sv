// ecm_system: the ECM engine of one FPGA - N_CORES independent ECM cores behind
// a data request scheduler.
//
// Each core runs both phases of ECM on its own curve and modulus: phase 1, a
// Montgomery ladder over the scalar k for the smoothness bound B1, and phase 2,
// which accumulates in d a product that vanishes modulo a prime factor f of N
// whenever the group order of the curve mod f is B1-smooth up to one prime in
// (B1, B2]. The cores share nothing but the host bus, so throughput grows with
// their number. The host loads a core's modulus, curve constant, point and
// d = 1, starts it, waits for its request line and reads back d (and, if it
// likes, Q = k*P); gcd(d, N) is left to the host.
//
// Defaults are the document's main configuration: 24 cores, b = 10 words of 17
// bits (moduli up to 151 bits), B1 = 960 (a 1374-bit scalar), B2 = 57000. The
// host port is the scheduler's, see ecm_scheduler; a read answers 2*PIPE+1
// cycles later.
module ecm_system
  import ecm_pkg::*;
#(
  parameter int N_CORES = 24,
  parameter int B_WORDS = 10,
  parameter int B1      = 960,
  parameter int B2      = 57000,
  parameter int PIPE    = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       h_valid,
  input  logic [$clog2(N_CORES)-1:0] h_core,
  input  logic                       h_we,
  input  logic                       h_start,
  input  logic [MEM_AW:0]            h_addr,
  input  word_t                      h_wdata,
  output logic                       h_rvalid,
  output word_t                      h_rdata,
  output logic [N_CORES-1:0]         req_pending,
  output logic [N_CORES-1:0]         core_busy
);

  logic [N_CORES-1:0] c_we, c_start, c_done;
  logic [MEM_AW:0]    c_addr;
  word_t              c_wdata;
  word_t              c_rdata [N_CORES];

  ecm_scheduler #(.N_CORES(N_CORES), .PIPE(PIPE)) u_sched (
    .clk, .rst_n,
    .h_valid, .h_core, .h_we, .h_start, .h_addr, .h_wdata,
    .h_rvalid, .h_rdata, .req_pending,
    .c_we, .c_start, .c_addr, .c_wdata, .c_rdata, .c_done
  );

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    ecm_core #(.B_WORDS(B_WORDS), .B1(B1), .B2(B2)) u_core (
      .clk, .rst_n,
      .host_we   (c_we[c]),
      .host_addr (c_addr),
      .host_wdata(c_wdata),
      .host_rdata(c_rdata[c]),
      .start     (c_start[c]),
      .busy      (core_busy[c]),
      .done      (c_done[c])
    );
  end

endmodule
