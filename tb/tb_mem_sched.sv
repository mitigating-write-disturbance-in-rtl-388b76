// tb_mem_sched: checks the request queues of the memory controller.
//   1. reads issue before older writes;
//   2. a read to a line with a queued write waits for that write;
//   3. a full write queue starts a burst: all 24 writes leave before any
//      waiting read, req_ready drops for writes while the queue is full, and
//      the burst ends when the queue is empty;
//   4. a full read queue drops req_ready for reads;
//   5. order inside each queue is kept (FIFO), checked on every issue.
module tb_mem_sched;
  import din_pkg::*;

  localparam int D = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              req_valid, req_ready, req_write;
  logic [ADDR_W-1:0] req_addr;
  line_t             req_wdata;
  logic              iss_valid, iss_ready, iss_write;
  logic [ADDR_W-1:0] iss_addr;
  line_t             iss_wdata;
  logic              burst;
  logic [$clog2(D+1)-1:0] rq_count, wq_count;
  int checks = 0, failures = 0;

  mem_sched #(.RQ_DEPTH(D), .WQ_DEPTH(D)) dut (.*);

  // reference queues
  logic [ADDR_W-1:0] rq_ref[$], wq_ref[$];
  string log[$];

  task automatic push(input logic w, input logic [ADDR_W-1:0] a);
    req_valid = 1; req_write = w; req_addr = a; req_wdata = {16{a[15:0], 16'hA5A5}};
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1;
    req_valid = 0;
    if (w) wq_ref.push_back(a); else rq_ref.push_back(a);
  endtask

  // issue monitor: checks FIFO order and data
  always @(posedge clk) if (rst_n && iss_valid && iss_ready) begin
    checks++;
    if (iss_write) begin
      if (wq_ref.size() == 0 || iss_addr != wq_ref[0] || iss_wdata != {16{iss_addr[15:0], 16'hA5A5}}) failures++;
      else void'(wq_ref.pop_front());
      log.push_back("W");
    end else begin
      if (rq_ref.size() == 0 || iss_addr != rq_ref[0]) failures++;
      else void'(rq_ref.pop_front());
      log.push_back("R");
    end
  end

  task automatic drain();
    iss_ready = 1;
    while (rq_ref.size() + wq_ref.size() > 0) @(posedge clk);
    #1;
    iss_ready = 0;
  endtask

  function automatic string joined();
    string s = "";
    foreach (log[i]) s = {s, log[i]};
    return s;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_write = 0; req_addr = '0; req_wdata = '0; iss_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // 1. read priority
    push(1, 10); push(1, 11); push(1, 12); push(0, 20); push(0, 21);
    log.delete();
    drain();
    checks++;
    if (joined() != "RRWWW") begin failures++; $display("order %s", joined()); end
    // 2. read after write to the same line
    push(1, 30); push(0, 30);
    log.delete();
    drain();
    checks++;
    if (joined() != "WR") begin failures++; $display("raw order %s", joined()); end
    // 3. write burst
    for (int i = 0; i < D; i++) push(1, 100 + i);
    @(posedge clk); #1;
    checks += 2;
    if (!burst) failures++;
    req_valid = 1; req_write = 1; req_addr = 999; #1;
    if (req_ready) failures++;
    req_valid = 0;
    push(0, 500); push(0, 501);
    log.delete();
    drain();
    checks++;
    if (joined() != {{D{"W"}}, "RR"}) begin failures++; $display("burst order %s", joined()); end
    checks++;
    if (burst) failures++;
    // 4. full read queue
    for (int i = 0; i < D; i++) push(0, 200 + i);
    req_valid = 1; req_write = 0; req_addr = 999; #1;
    checks++;
    if (req_ready) failures++;
    req_valid = 0;
    drain();
    checks++;
    if (rq_count != 0 || wq_count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
