// din_env: end-to-end test environment for din_top, used by the top-level
// testbenches. It holds the PCM behavioural model, sends a stream of line
// writes and reads, and checks every read response against a reference
// memory that is updated when a write completes (wr_done; the datapath runs
// one request at a time, so later reads must see it).
//
// Traffic: NREQ requests in phases:
//   1. light traffic, mixed compressible / incompressible lines;
//   2. a flood of writes that fills the write queue (write burst), with
//      reads queued behind it;
//   3. random traffic at a high disturbance rate (restores, full writes,
//      BCH corrections on read).
// Every mechanism is counted and must be seen at least once: encoded
// write, raw write, restore, full-line write, BCH-corrected read, raw read,
// write burst, read issued ahead of an older write, stall (req_ready low),
// full-line write waiting for the power grant.
// The read latency with an idle queue is checked against its fixed value.
module din_env
  import din_pkg::*;
  import tb_ref_pkg::rand_fpc_line;
#(
  parameter cell_e       MODE = CELL_SLC,
  parameter int unsigned NREQ = 400
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              req_valid,
  input  logic              req_ready,
  output logic              req_write,
  output logic [ADDR_W-1:0] req_addr,
  output line_t             req_wdata,
  input  logic              resp_valid,
  input  logic [ADDR_W-1:0] resp_addr,
  input  line_t             resp_data,
  input  logic              resp_encoded,
  input  logic [1:0]        resp_nerr,
  input  logic              resp_err,
  input  logic              wr_done,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic              wr_encoded,
  input  logic [3:0]        wr_verifies,
  input  logic [3:0]        wr_restores,
  input  logic              wr_full,
  input  logic              burst,
  input  logic              pwr_full_req,
  output logic              pwr_full_grant,
  input  logic              pcm_req_valid,
  output logic              pcm_req_ready,
  input  logic              pcm_req_write,
  input  logic [ADDR_W-1:0] pcm_req_addr,
  input  cells_t            pcm_req_mask,
  input  cells_t            pcm_req_data,
  output logic              pcm_rsp_valid,
  output cells_t            pcm_rsp_data,
  output int                checks,
  output int                failures,
  output logic              finished
);

  int unsigned dist_pct;
  int unsigned n_prog, n_read, n_dist;

  pcm_model #(.RD_LAT(2), .WR_LAT(3)) u_pcm (
    .clk, .mode(MODE), .dist_pct,
    .req_valid(pcm_req_valid), .req_ready(pcm_req_ready), .req_write(pcm_req_write),
    .req_addr(pcm_req_addr), .req_mask(pcm_req_mask), .req_data(pcm_req_data),
    .rsp_valid(pcm_rsp_valid), .rsp_data(pcm_rsp_data),
    .n_prog, .n_read, .n_disturbed(n_dist)
  );

  // reference state
  line_t ref_mem [logic [ADDR_W-1:0]];
  line_t pend    [logic [ADDR_W-1:0]][$];
  int    wr_seq_acc = 0, wr_seq_done = 0;
  int    rd_wr_mark[$];        // writes accepted before each queued read
  int    rd_issue_t[$];
  int    outstanding = 0;
  longint cyc = 0;

  // mechanism counters
  int n_enc_wr = 0, n_raw_wr = 0, n_restore = 0, n_full = 0;
  int n_bch_rd = 0, n_raw_rd = 0, n_enc_rd = 0, n_burst = 0, n_bypass = 0, n_stall = 0;
  int n_reads = 0, n_writes = 0;
  logic burst_q = 0;

  always @(posedge clk) cyc++;

  // power budget: grants a waiting full-line write after a random delay
  int n_pwr_wait = 0;
  initial pwr_full_grant = 1'b0;
  always @(posedge clk) begin
    pwr_full_grant <= pwr_full_req && ($urandom % 3 == 0);
    if (pwr_full_req && !pwr_full_grant) n_pwr_wait++;
  end

  always @(posedge clk) if (rst_n) begin
    burst_q <= burst;
    if (burst && !burst_q) n_burst++;
    if (req_valid && !req_ready) n_stall++;
    if (wr_done) begin
      n_writes++;
      // lines built to compress to exactly 369 and 370 bits
      if (wr_addr == ADDR_W'(300) || wr_addr == ADDR_W'(301)) begin
        checks++;
        if (wr_encoded != (wr_addr == ADDR_W'(300))) begin
          failures++;
          $display("FAIL size threshold: line %0d encoded=%b", wr_addr, wr_encoded);
        end
      end
      wr_seq_done++;
      if (wr_encoded) n_enc_wr++; else n_raw_wr++;
      if (wr_restores > 0) n_restore++;
      if (wr_full) n_full++;
      if (pend.exists(wr_addr) && pend[wr_addr].size() > 0)
        ref_mem[wr_addr] = pend[wr_addr].pop_front();
      else begin
        failures++;
        $display("FAIL unexpected write completion %h", wr_addr);
      end
    end
    if (resp_valid) begin
      line_t exp;
      n_reads++;
      exp = ref_mem.exists(resp_addr) ? ref_mem[resp_addr] : '0;
      checks++;
      if (resp_data !== exp || resp_err) begin
        failures++;
        if (failures < 5) $display("FAIL read %h enc=%b nerr=%0d err=%b\n got %h\n exp %h",
                                   resp_addr, resp_encoded, resp_nerr, resp_err, resp_data, exp);
      end
      if (resp_encoded) n_enc_rd++; else n_raw_rd++;
      if (resp_nerr != 0) n_bch_rd++;
      if (rd_wr_mark.size() > 0) begin
        if (rd_wr_mark.pop_front() > wr_seq_done) n_bypass++;
      end
    end
  end

  task automatic send(input logic w, input logic [ADDR_W-1:0] a, input line_t d);
    req_valid = 1; req_write = w; req_addr = a; req_wdata = d;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    if (w) begin
      pend[a].push_back(d);
      wr_seq_acc++;
    end else begin
      rd_wr_mark.push_back(wr_seq_acc);
    end
    #1;
    req_valid = 0;
  endtask

  function automatic line_t gen_line();
    line_t l;
    if ($urandom % 100 < 75) l = rand_fpc_line(20 + $urandom % 40, $urandom % 15);
    else for (int i = 0; i < 16; i++) l[32*i +: 32] = $urandom;
    return l;
  endfunction

  task automatic wait_idle();
    int guard = 0;
    while ((n_reads + n_writes) < (wr_seq_acc + rd_wr_mark.size() + n_reads) && guard < 200000) begin
      @(posedge clk); guard++;
    end
    repeat (5) @(posedge clk);
    #1;
  endtask

  initial begin
    longint t0;
    int     sent = 0;
    checks = 0; failures = 0; finished = 0;
    rst_n = 0; req_valid = 0; req_write = 0; req_addr = '0; req_wdata = '0;
    dist_pct = 5;
    repeat (4) @(posedge clk);
    #1;
    rst_n = 1;
    @(posedge clk); #1;

    // read of a never-written line, and the idle read latency
    t0 = cyc;
    send(0, 27'h1234, '0);
    while (!resp_valid) @(posedge clk);
    checks++;
    if (cyc - t0 != 7) begin
      failures++; $display("FAIL idle read latency %0d cycles", cyc - t0);
    end
    @(posedge clk); #1;

    // the 369-bit threshold: 8 raw words (35 bits each), 3 16-bit words
    // (19), then 2 zero words + 3 4-bit words (370 bits) or 3 zero words +
    // 2 4-bit words (369 bits); zero words are kept apart so that each is
    // a run of its own (6 bits)
    for (int v = 0; v < 2; v++) begin
      line_t l;
      for (int k = 0; k < 8; k++) l[32*(2*k+1) +: 32] = 32'h8765_4321 + 32'(k);
      l[0 +: 32]  = 0;
      l[64 +: 32] = 0;
      l[128 +: 32] = (v == 0) ? 32'd0 : 32'd5;
      l[192 +: 32] = 32'h0000_1234;
      l[256 +: 32] = 32'h0000_1235;
      l[320 +: 32] = 32'h0000_1236;
      l[384 +: 32] = 32'd3;
      l[448 +: 32] = 32'd4;
      send(1, ADDR_W'(300 + v), l);
      send(0, ADDR_W'(300 + v), '0);
    end
    wait_idle();

    // phase 1: light traffic on 32 lines
    for (int i = 0; i < NREQ / 4; i++) begin
      logic [ADDR_W-1:0] a;
      a = ADDR_W'($urandom % 32);
      if ($urandom % 2) send(1, a, gen_line()); else send(0, a, '0);
      repeat ($urandom % 40) @(posedge clk);
      #1;
      sent++;
    end
    wait_idle();

    // phase 2: write flood (burst) with reads behind it
    for (int i = 0; i < 30; i++) send(1, ADDR_W'(64 + i), gen_line());
    for (int i = 0; i < 4; i++) send(0, ADDR_W'($urandom % 32), '0);
    for (int i = 0; i < 30; i++) send(0, ADDR_W'(64 + i), '0);
    wait_idle();

    // phase 3: heavy disturbance, random traffic
    dist_pct = 30;
    for (int i = 0; i < NREQ / 2; i++) begin
      logic [ADDR_W-1:0] a;
      a = ADDR_W'($urandom % 48);
      if ($urandom % 3 == 0) send(0, a, '0); else send(1, a, gen_line());
      if ($urandom % 4 == 0) repeat ($urandom % 60) @(posedge clk);
      #1;
    end
    // read back everything written
    for (int a = 0; a < 96; a++) send(0, ADDR_W'(a), '0);
    wait_idle();
    dist_pct = 100;
    // incompressible lines: raw writes, no tolerated errors, cascades of
    // restores until the full-line write
    for (int i = 0; i < 16; i++) begin
      line_t l;
      for (int k = 0; k < 16; k++) l[32*k +: 32] = $urandom;
      send(1, ADDR_W'(200 + i % 8), l);
    end
    for (int i = 0; i < 8; i++) send(0, ADDR_W'(200 + i), '0);
    wait_idle();

    $display("[%s] writes %0d (encoded %0d raw %0d restore %0d full %0d) reads %0d (encoded %0d raw %0d bch-corrected %0d)",
             MODE.name(), n_writes, n_enc_wr, n_raw_wr, n_restore, n_full, n_reads, n_enc_rd, n_raw_rd, n_bch_rd);
    $display("[%s] bursts %0d  reads ahead of older writes %0d  stall cycles %0d  power-wait cycles %0d  disturbed cells %0d",
             MODE.name(), n_burst, n_bypass, n_stall, n_pwr_wait, n_dist);
    checks += 9;
    if (n_enc_wr == 0)  begin failures++; $display("never: encoded write"); end
    if (n_raw_wr == 0)  begin failures++; $display("never: raw write"); end
    if (n_restore == 0) begin failures++; $display("never: restore"); end
    if (n_full == 0)    begin failures++; $display("never: full write"); end
    if (n_enc_rd == 0)  begin failures++; $display("never: encoded read"); end
    if (n_raw_rd == 0)  begin failures++; $display("never: raw read"); end
    if (n_burst == 0)   begin failures++; $display("never: write burst"); end
    if (n_bypass == 0)  begin failures++; $display("never: read ahead of write"); end
    if (n_stall == 0)   begin failures++; $display("never: stall"); end
    checks++;
    if (n_pwr_wait == 0) begin failures++; $display("never: full write waiting for power"); end
    // BCH correction on read happens only where a cell was left disturbed
    if (MODE != CELL_SSMR) begin
      checks++;
      if (n_bch_rd == 0) begin failures++; $display("never: BCH-corrected read"); end
    end
    finished = 1;
  end
endmodule
