// tb_din_top: end-to-end test of din_top at its default parameters (SLC
// cells, 24-entry queues, full 64-byte lines), driven by din_env: mixed
// compressible and incompressible lines, write bursts, reads checked against
// a reference memory while the PCM model disturbs neighbouring cells.
module tb_din_top;
  import din_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

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

  din_top dut (.*);
  din_env #(.MODE(CELL_SLC), .NREQ(400)) env (.*);

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (finished) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
