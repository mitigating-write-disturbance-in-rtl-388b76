// tb_vnr_write_ctrl: drives the verify-and-restore writer against the PCM
// behavioural model (SLC disturbance) and checks, for every write:
//   - the stored line ends within `tol` cells of the target (exactly equal
//     for tol = 0 or after a full write), with the flag cell right;
//   - the number of PCM programs and reads matches the statistics:
//     programs = 1 + restores (+1 for a full write), reads = verifies;
//   - no more than 5 verifies, and a full write only after the 5th;
//   - an unchanged line causes no PCM access at all;
//   - a full write waits for the power grant (given after random delays);
//   - the cycle count of a clean write: program (accept + 3 busy cycles),
//     verify (accept + 2 cycles latency), decision.
// Disturbance rates 0 %, 20 % and 100 % are used so that clean writes,
// restores and full writes all occur; each must have been seen.
module tb_vnr_write_ctrl;
  import din_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, busy, done, full_write, full_req, full_grant;
  int          grant_wait = 0;
  cells_t      old_cells, new_cells;
  logic [1:0]  tol;
  logic [3:0]  n_verify, n_restore;
  logic [9:0]  resid_err;
  logic        req_valid, req_ready, req_write, rsp_valid;
  cells_t      req_mask, req_data, rsp_data;
  int unsigned dist_pct, n_prog, n_read, n_dist;
  int checks = 0, failures = 0;
  int seen_clean = 0, seen_restore = 0, seen_full = 0, seen_tol = 0;

  vnr_write_ctrl dut (.*);

  pcm_model #(.RD_LAT(2), .WR_LAT(3)) u_pcm (
    .clk, .mode(CELL_SLC), .dist_pct,
    .req_valid, .req_ready, .req_write, .req_addr('0), .req_mask, .req_data,
    .rsp_valid, .rsp_data, .n_prog, .n_read, .n_disturbed(n_dist)
  );

  // power grant for full writes arrives after a random delay; a full write
  // must never be issued without it
  always @(posedge clk) begin
    full_grant <= full_req && ($urandom % 4 == 0);
    if (full_req && !full_grant) grant_wait++;
    if (req_valid && req_write && req_mask == '1 && !full_grant) begin
      failures++;
      $display("FAIL full write issued without power grant");
    end
  end

  task automatic do_write(input cells_t nw, input logic [1:0] t, output int cycles);
    int p0, r0;
    cells_t got, diff;
    int cnt;
    p0 = n_prog; r0 = n_read;
    old_cells = u_pcm.line_of('0);
    new_cells = nw;
    tol = t;
    start = 1;
    cycles = 0;
    @(posedge clk); #1;
    start = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
    @(posedge clk); #1;
    got  = u_pcm.line_of('0);
    diff = got ^ nw;
    cnt  = $countones(diff[LINE_BITS-1:0]);
    checks += 5;
    if (diff[FLAG_CELL] || cnt > int'(t) || (full_write && cnt != 0)) begin
      failures++; $display("FAIL residual %0d tol %0d", cnt, t);
    end
    if (int'(resid_err) != cnt) failures++;
    if (n_prog - p0 != (old_cells == nw ? 0 : 1 + int'(n_restore) + (full_write ? 1 : 0))) failures++;
    if (n_read - r0 != int'(n_verify)) failures++;
    if (n_verify > 4'd5 || (full_write && n_verify != 4'd5)) failures++;
    if (old_cells != nw) begin
      if (full_write) seen_full++;
      else if (n_restore > 0) seen_restore++;
      else seen_clean++;
      if (cnt > 0) seen_tol++;
    end
  endtask

  function automatic cells_t rand_line(input int ones_pct);
    cells_t c;
    for (int i = 0; i < CELLS; i++) c[i] = 1'(($urandom % 100) < ones_pct);
    return c;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    cells_t l;
    start = 0; tol = 0; old_cells = '0; new_cells = '0; dist_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // clean write and its cycle count: PROG 1+3, VER 1+2, one cycle for
    // the answer to be registered, done
    l = rand_line(50);
    do_write(l, 0, cyc);
    checks++;
    if (cyc != 8 || n_verify != 1 || n_restore != 0) begin
      failures++; $display("FAIL clean write cycles=%0d", cyc);
    end
    // unchanged line: no PCM access
    do_write(l, 0, cyc);
    checks++;
    if (n_verify != 0 || cyc > 1) failures++;
    // disturbing writes, raw (tol 0) and encoded (tol 2)
    dist_pct = 20;
    for (int t = 0; t < 60; t++) do_write(rand_line(30 + $urandom % 40), 2'((t % 2) * 2), cyc);
    dist_pct = 100;
    for (int t = 0; t < 10; t++) do_write(rand_line(50), 0, cyc);
    checks += 4;
    if (grant_wait == 0)   failures++;
    if (seen_clean == 0)   failures++;
    if (seen_restore == 0) failures++;
    if (seen_full == 0)    failures++;
    $display("clean %0d restore %0d full %0d tolerated %0d disturbed cells %0d",
             seen_clean, seen_restore, seen_full, seen_tol, n_dist);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
