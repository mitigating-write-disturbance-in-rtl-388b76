// vnr_write_ctrl: verify-and-restore (VnR) write of one memory line.
//
// A write programs only the cells whose value changes (differential write).
// Programming a cell can disturb idle neighbours, so after every program
// step the line is read back (verify) and compared with the target. If at
// most `tol` data cells differ, and the flag cell is right, the write is
// finished: the caller passes tol = 2 for an encoded line, whose remaining
// errors the BCH code corrects, and tol = 0 for a raw line. Otherwise only the
// differing cells are programmed again (restore) and verified again. After
// MAX_VNR failing verifies the whole line is programmed at once (full write),
// which leaves no idle cell along the word-line and so cannot be disturbed;
// no verify follows it. A full write draws far more programming current
// than a differential one, so it waits until full_grant says the chip's
// power budget allows it (full_req is high while it waits).
//
// PCM port: a request (valid/ready) is a program step (req_write = 1, cells
// in req_mask set to req_data) or a verify read (req_write = 0). A read
// answers later with one rsp_valid cycle carrying the whole line.
// start is taken in IDLE; done pulses for one cycle at the end, together
// with the statistics of the write, which stay valid until the next start.
// The five-round limit, the 2-error tolerance for encoded lines and the
// full-line fallback follow the DIN scheme; the requirement that the flag
// cell verify exactly and the port protocol are this design's choices.
module vnr_write_ctrl
  import din_pkg::*;
#(
  parameter int unsigned MAX_ROUNDS = MAX_VNR
) (
  input  logic         clk,
  input  logic         rst_n,
  // job
  input  logic         start,
  input  cells_t       old_cells,
  input  cells_t       new_cells,
  input  logic [1:0]   tol,
  output logic         busy,
  output logic         done,
  // statistics of the last write
  output logic [3:0]   n_verify,
  output logic [3:0]   n_restore,
  output logic         full_write,
  output logic [9:0]   resid_err,
  // power budget for the full-line write
  output logic         full_req,
  input  logic         full_grant,
  // PCM port
  output logic         req_valid,
  input  logic         req_ready,
  output logic         req_write,
  output cells_t       req_mask,
  output cells_t       req_data,
  input  logic         rsp_valid,
  input  cells_t       rsp_data
);

  typedef enum logic [2:0] {S_IDLE, S_PROG, S_VER, S_WAIT, S_FULL, S_DONE} state_e;
  state_e state;

  cells_t target, mask;
  cells_t diff;
  logic [9:0] diff_cnt;

  always_comb begin
    diff     = rsp_data ^ target;
    diff_cnt = '0;
    for (int i = 0; i < LINE_BITS; i++) diff_cnt += 10'(diff[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      target     <= '0;
      mask       <= '0;
      n_verify   <= '0;
      n_restore  <= '0;
      full_write <= 1'b0;
      resid_err  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          target     <= new_cells;
          mask       <= old_cells ^ new_cells;
          n_verify   <= '0;
          n_restore  <= '0;
          full_write <= 1'b0;
          resid_err  <= '0;
          state      <= ((old_cells ^ new_cells) == '0) ? S_DONE : S_PROG;
        end
        S_PROG: if (req_ready) state <= S_VER;
        S_VER:  if (req_ready) state <= S_WAIT;
        S_WAIT: if (rsp_valid) begin
          n_verify  <= n_verify + 4'd1;
          resid_err <= diff_cnt;
          if (diff_cnt <= 10'(tol) && !diff[FLAG_CELL]) begin
            state <= S_DONE;
          end else if (32'(n_verify) + 1 >= MAX_ROUNDS) begin
            state <= S_FULL;
          end else begin
            mask      <= diff;
            n_restore <= n_restore + 4'd1;
            state     <= S_PROG;
          end
        end
        S_FULL: if (req_ready && full_grant) begin
          full_write <= 1'b1;
          resid_err  <= '0;
          state      <= S_DONE;
        end
        default: state <= S_IDLE;   // S_DONE
      endcase
    end
  end

  always_comb begin
    req_valid = 1'b0;
    req_write = 1'b0;
    req_mask  = mask;
    req_data  = target;
    unique case (state)
      S_PROG: begin req_valid = 1'b1; req_write = 1'b1; end
      S_VER:  begin req_valid = 1'b1; req_write = 1'b0; end
      S_FULL: begin req_valid = full_grant; req_write = 1'b1; req_mask = '1; end
      default: ;
    endcase
  end

  assign busy     = (state != S_IDLE);
  assign full_req = (state == S_FULL);
  assign done = (state == S_DONE);

endmodule
