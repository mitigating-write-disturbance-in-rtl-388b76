// mem_sched: read/write request queues of the PCM memory controller.
//
// Reads and writes wait in separate queues (RQ_DEPTH / WQ_DEPTH entries,
// 24 each by default). Reads go first: a write is issued only when no read
// waits. When the write queue becomes full, a write burst starts: only writes
// are issued, blocking pending reads, until the write queue is empty again.
// A read whose line address matches a queued write is held back and writes
// are issued instead until the match has left the queue, so a read never
// returns data older than a write accepted before it (this ordering rule is
// this design's own choice).
//
// Interfaces: requests enter with req_valid/req_ready (ready depends on
// req_write: it reflects the space in the queue the request goes to); the
// chosen request leaves on iss_valid/iss_ready. Both are plain valid/ready
// handshakes, a transfer happening on a clock edge with valid and ready high.
module mem_sched
  import din_pkg::*;
#(
  parameter int unsigned RQ_DEPTH = 24,
  parameter int unsigned WQ_DEPTH = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  logic [ADDR_W-1:0] req_addr,
  input  line_t             req_wdata,
  output logic              iss_valid,
  input  logic              iss_ready,
  output logic              iss_write,
  output logic [ADDR_W-1:0] iss_addr,
  output line_t             iss_wdata,
  output logic              burst,
  output logic [$clog2(RQ_DEPTH+1)-1:0] rq_count,
  output logic [$clog2(WQ_DEPTH+1)-1:0] wq_count
);

  localparam int unsigned RPW = $clog2(RQ_DEPTH);
  localparam int unsigned WPW = $clog2(WQ_DEPTH);

  logic [ADDR_W-1:0] rq_addr [RQ_DEPTH];
  logic [ADDR_W-1:0] wq_addr [WQ_DEPTH];
  line_t             wq_data [WQ_DEPTH];
  logic [RPW-1:0]    rq_head, rq_tail;
  logic [WPW-1:0]    wq_head, wq_tail;

  logic rq_empty, rq_full, wq_empty, wq_full;
  logic conflict, pick_write;
  logic rq_push, wq_push, rq_pop, wq_pop;

  assign rq_empty = (rq_count == 0);
  assign wq_empty = (wq_count == 0);
  assign rq_full  = (32'(rq_count) == RQ_DEPTH);
  assign wq_full  = (32'(wq_count) == WQ_DEPTH);

  // Does the oldest read hit a queued write?
  always_comb begin
    int unsigned age;
    conflict = 1'b0;
    for (int k = 0; k < WQ_DEPTH; k++) begin
      age = (32'(k) + WQ_DEPTH - 32'(wq_head)) % WQ_DEPTH;
      if (age < 32'(wq_count) && wq_addr[k] == rq_addr[rq_head]) conflict = 1'b1;
    end
    if (rq_empty) conflict = 1'b0;
  end

  assign pick_write = !wq_empty && (burst || rq_empty || conflict);
  assign iss_valid  = pick_write || !rq_empty;
  assign iss_write  = pick_write;
  assign iss_addr   = pick_write ? wq_addr[wq_head] : rq_addr[rq_head];
  assign iss_wdata  = wq_data[wq_head];

  assign req_ready = req_write ? !wq_full : !rq_full;
  assign rq_push   = req_valid && req_ready && !req_write;
  assign wq_push   = req_valid && req_ready &&  req_write;
  assign rq_pop    = iss_valid && iss_ready && !pick_write;
  assign wq_pop    = iss_valid && iss_ready &&  pick_write;

  function automatic logic [RPW-1:0] rnext(input logic [RPW-1:0] p);
    return (32'(p) == RQ_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [WPW-1:0] wnext(input logic [WPW-1:0] p);
    return (32'(p) == WQ_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_head  <= '0;
      rq_tail  <= '0;
      wq_head  <= '0;
      wq_tail  <= '0;
      rq_count <= '0;
      wq_count <= '0;
      burst    <= 1'b0;
    end else begin
      if (rq_push) rq_tail <= rnext(rq_tail);
      if (rq_pop)  rq_head <= rnext(rq_head);
      if (wq_push) wq_tail <= wnext(wq_tail);
      if (wq_pop)  wq_head <= wnext(wq_head);
      rq_count <= rq_count + $bits(rq_count)'(rq_push) - $bits(rq_count)'(rq_pop);
      wq_count <= wq_count + $bits(wq_count)'(wq_push) - $bits(wq_count)'(wq_pop);
      // burst starts when the write queue fills up, ends when it drains
      if (wq_full && !wq_pop)                           burst <= 1'b1;
      else if (32'(wq_count) == 1 && wq_pop && !wq_push) burst <= 1'b0;
      else if (wq_empty)                                burst <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rq_push) rq_addr[rq_tail] <= req_addr;
    if (wq_push) begin
      wq_addr[wq_tail] <= req_addr;
      wq_data[wq_tail] <= req_wdata;
    end
  end

  // a queue never overflows or underflows
  assert property (@(posedge clk) disable iff (!rst_n) !(rq_pop && rq_empty));
  assert property (@(posedge clk) disable iff (!rst_n) !(wq_pop && wq_empty));

endmodule
