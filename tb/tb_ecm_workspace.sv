// tb_ecm_workspace: random writes through the three unit ports and the host
// port, then reads through every port, compared with a model array; checks the
// one-cycle read latency and that simultaneous writes to different words all
// land.
module tb_ecm_workspace;
  import ecm_pkg::*;
  logic clk = 0;
  maddr_t rd_addr [3];
  word_t  rd_data [3];
  logic   wr_en   [3];
  maddr_t wr_addr [3];
  word_t  wr_data [3];
  logic   h_we;
  maddr_t h_addr;
  word_t  h_wdata, h_rdata;
  word_t  model [1024];
  int checks = 0, failures = 0;

  ecm_workspace #(.N_PORTS(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) begin wr_en[p] = 0; rd_addr[p] = '0; wr_addr[p] = '0; wr_data[p] = '0; end
    h_we = 0; h_addr = '0; h_wdata = '0;
    // fill everything through the host port
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      h_we = 1; h_addr = maddr_t'(a); h_wdata = word_t'($urandom); model[a] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    // parallel writes through the unit ports, to distinct addresses
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        wr_en[p]   = ($urandom % 2) == 1;
        wr_addr[p] = maddr_t'(p * 341 + ($urandom % 341));
        wr_data[p] = word_t'($urandom);
        if (wr_en[p]) model[wr_addr[p]] = wr_data[p];
      end
    end
    @(negedge clk);
    for (int p = 0; p < 3; p++) wr_en[p] = 0;
    // read back through all ports
    for (int n = 0; n < 1024; n++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) rd_addr[p] = maddr_t'((n + 100 * p) % 1024);
      h_addr = maddr_t'(1023 - n);
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd_data[p] !== model[(n + 100 * p) % 1024]) begin
          failures++;
          $display("port %0d addr %0d got %h expected %h", p, (n + 100*p) % 1024, rd_data[p], model[(n + 100*p) % 1024]);
        end
      end
      checks++;
      if (h_rdata !== model[1023 - n]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
