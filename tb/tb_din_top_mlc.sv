// tb_din_top_mlc: end-to-end test of din_top for 2-bit MLC cells, one
// instance per programming scheme: SSMR (shares the SLC code book, full
// RESET = cell value 00) and SRMS (own code book without "01" cells, every
// programmed cell is RESET first). Each instance has its own din_env and PCM
// model disturbing neighbouring cells by the scheme's rule.
module tb_din_top_mlc;
  import din_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks, failures;
  logic fin_ssmr, fin_srms;

  // ---- SSMR ----
  generate if (1) begin : g_ssmr
    logic              rst_n, req_valid, req_ready, req_write;
    logic [ADDR_W-1:0] req_addr, resp_addr, wr_addr, pcm_req_addr;
    line_t             req_wdata, resp_data;
    logic              resp_valid, resp_encoded, resp_err;
    logic [1:0]        resp_nerr;
    logic              wr_done, wr_encoded, wr_full, burst, pwr_full_req, pwr_full_grant;
    logic [3:0]        wr_verifies, wr_restores;
    logic              pcm_req_valid, pcm_req_ready, pcm_req_write, pcm_rsp_valid;
    cells_t            pcm_req_mask, pcm_req_data, pcm_rsp_data;
    int                checks, failures;
    logic              finished;

    din_top #(.CELL_TYPE(CELL_SSMR)) dut_ssmr (.*);
    din_env #(.MODE(CELL_SSMR), .NREQ(300)) env_ssmr (.*);
  end endgenerate

  // ---- SRMS ----
  generate if (1) begin : g_srms
    logic              rst_n, req_valid, req_ready, req_write;
    logic [ADDR_W-1:0] req_addr, resp_addr, wr_addr, pcm_req_addr;
    line_t             req_wdata, resp_data;
    logic              resp_valid, resp_encoded, resp_err;
    logic [1:0]        resp_nerr;
    logic              wr_done, wr_encoded, wr_full, burst, pwr_full_req, pwr_full_grant;
    logic [3:0]        wr_verifies, wr_restores;
    logic              pcm_req_valid, pcm_req_ready, pcm_req_write, pcm_rsp_valid;
    cells_t            pcm_req_mask, pcm_req_data, pcm_rsp_data;
    int                checks, failures;
    logic              finished;

    din_top #(.CELL_TYPE(CELL_SRMS)) dut_srms (.*);
    din_env #(.MODE(CELL_SRMS), .NREQ(300)) env_srms (.*);
  end endgenerate

  assign fin_ssmr = g_ssmr.finished;
  assign fin_srms = g_srms.finished;
  assign checks   = g_ssmr.checks + g_srms.checks;
  assign failures = g_ssmr.failures + g_srms.failures;

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (fin_ssmr && fin_srms) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
