// din_top: memory-side datapath of a write-disturbance-insulated PCM main
// memory (DIN: compression + (3,4) data-insulation encoding + BCH +
// verify-and-restore writes).
//
// Requests for 64-byte lines queue in mem_sched (reads first, write bursts
// when the write queue is full). One request at a time is then carried out
// against the PCM port:
//   write: compress the line with FPC; if it fits in 369 bits, (3,4)-encode
//          it to 492 bits, append the 20-bit BCH parity and set the flag cell
//          (cells = {1, data, parity}); otherwise store it raw (flag 0). Read
//          the old cells, then let vnr_write_ctrl program the changed cells,
//          verify, restore and, as the last resort, write the full line.
//          An encoded line may keep up to 2 disturbed cells (BCH corrects
//          them), a raw line none. A full-line write waits for
//          pwr_full_grant from the chip's power budget.
//   read:  read the cells; for an encoded line BCH-correct, (3,4)-decode and
//          decompress; a raw line is returned as stored.
// Timing: one cycle per stage: write = issue, compress, encode, old-line
// read (request + answer), VnR, done; read = issue, request, answer,
// BCH correct, decode + respond. resp_valid and wr_done are one-cycle pulses.
// CELL_TYPE picks the code book (SLC and SSMR share one, SRMS has its own).
// The PCM chip itself is outside: its port is the pcm_* signals, a
// valid/ready request and a one-cycle read answer, as in vnr_write_ctrl.
// The chain of blocks, the 369-bit threshold, the 20-bit parity and the flag
// cell follow the DIN scheme. The one-cycle stages, serving one request at a
// time, reading the old line before each write and the port protocols are
// this design's own choices.
module din_top
  import din_pkg::*;
#(
  parameter cell_e       CELL_TYPE = CELL_SLC,
  parameter int unsigned RQ_DEPTH  = 24,
  parameter int unsigned WQ_DEPTH  = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  // line requests from the cache hierarchy
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  logic [ADDR_W-1:0] req_addr,
  input  line_t             req_wdata,
  // read responses
  output logic              resp_valid,
  output logic [ADDR_W-1:0] resp_addr,
  output line_t             resp_data,
  output logic              resp_encoded,
  output logic [1:0]        resp_nerr,      // cells corrected by BCH
  output logic              resp_err,       // data not recoverable
  // completed writes
  output logic              wr_done,
  output logic [ADDR_W-1:0] wr_addr,
  output logic              wr_encoded,
  output logic [3:0]        wr_verifies,
  output logic [3:0]        wr_restores,
  output logic              wr_full,
  output logic              burst,
  // power budget: a full-line write waits for pwr_full_grant
  output logic              pwr_full_req,
  input  logic              pwr_full_grant,
  // PCM chip port
  output logic              pcm_req_valid,
  input  logic              pcm_req_ready,
  output logic              pcm_req_write,
  output logic [ADDR_W-1:0] pcm_req_addr,
  output cells_t            pcm_req_mask,
  output cells_t            pcm_req_data,
  input  logic              pcm_rsp_valid,
  input  cells_t            pcm_rsp_data
);

  // ------------------------------------------------------------------
  // request queues
  // ------------------------------------------------------------------
  logic              iss_valid, iss_ready, iss_write;
  logic [ADDR_W-1:0] iss_addr;
  line_t             iss_wdata;

  mem_sched #(.RQ_DEPTH(RQ_DEPTH), .WQ_DEPTH(WQ_DEPTH)) u_sched (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_write, .req_addr, .req_wdata,
    .iss_valid, .iss_ready, .iss_write, .iss_addr, .iss_wdata,
    .burst, .rq_count(), .wq_count()
  );

  // ------------------------------------------------------------------
  // line engine
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    E_IDLE, E_W_COMP, E_W_ENC, E_W_OLD, E_W_OLDW, E_W_VNR, E_W_WAIT,
    E_R_REQ, E_R_WAIT, E_R_BCH, E_R_DEC
  } estate_e;
  estate_e state;

  logic [ADDR_W-1:0] addr_q;
  line_t             wdata_q;
  logic [CBITS-1:0]  cdata_q;
  logic              fits_q;
  cells_t            new_q, old_q, raw_q;
  line_t             corr_q;
  logic [1:0]        nerr_q;
  logic              uncorr_q;

  assign iss_ready = (state == E_IDLE);

  // write path
  logic [FPC_MAXB-1:0] c_stream;
  logic [CLEN_W-1:0]   c_len;
  logic [EBITS-1:0]    e_data;
  logic [BCH_BITS-1:0] e_par;

  fpc_compress u_fpc_c (.line(wdata_q), .cdata(c_stream), .clen(c_len));
  din_encoder #(.MODE(CELL_TYPE)) u_din_e (.cdata(cdata_q), .edata(e_data));
  bch_encoder u_bch_e (.data(e_data), .parity(e_par));

  // read path
  line_t               b_data;
  logic [1:0]          b_nerr;
  logic                b_uncorr;
  logic [CBITS-1:0]    d_cdata;
  logic [GROUPS-1:0]   d_bad;
  logic                d_err;
  line_t               f_line;
  logic [CLEN_W-1:0]   f_len;
  logic                f_err;

  bch_decoder u_bch_d (.rdata(raw_q[LINE_BITS-1:0]), .cdata(b_data), .nerr(b_nerr), .uncorr(b_uncorr));
  din_decoder #(.MODE(CELL_TYPE)) u_din_d (
    .edata(corr_q[LINE_BITS-1 -: EBITS]), .cdata(d_cdata), .bad_group(d_bad), .err(d_err));
  fpc_decompress u_fpc_d (
    .cdata(FPC_MAXB'(d_cdata)), .clen_max(CLEN_W'(CBITS)), .line(f_line), .clen(f_len), .err(f_err));

  // verify-and-restore writer
  logic       v_start, v_busy, v_done, v_full;
  logic [3:0] v_nver, v_nres;
  logic [9:0] v_resid;
  logic       v_req_valid, v_req_write;
  cells_t     v_req_mask, v_req_data;

  vnr_write_ctrl u_vnr (
    .clk, .rst_n,
    .start(v_start), .old_cells(old_q), .new_cells(new_q),
    .tol(new_q[FLAG_CELL] ? 2'(ENC_TOL) : 2'd0),
    .busy(v_busy), .done(v_done),
    .n_verify(v_nver), .n_restore(v_nres), .full_write(v_full), .resid_err(v_resid),
    .full_req(pwr_full_req), .full_grant(pwr_full_grant),
    .req_valid(v_req_valid), .req_ready(pcm_req_ready), .req_write(v_req_write),
    .req_mask(v_req_mask), .req_data(v_req_data),
    .rsp_valid(pcm_rsp_valid), .rsp_data(pcm_rsp_data)
  );

  assign v_start = (state == E_W_VNR);

  always_comb begin
    pcm_req_addr = addr_q;
    if (state == E_W_WAIT) begin
      pcm_req_valid = v_req_valid;
      pcm_req_write = v_req_write;
      pcm_req_mask  = v_req_mask;
      pcm_req_data  = v_req_data;
    end else begin
      pcm_req_valid = (state == E_W_OLD) || (state == E_R_REQ);
      pcm_req_write = 1'b0;
      pcm_req_mask  = '0;
      pcm_req_data  = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= E_IDLE;
      addr_q   <= '0;
      wdata_q  <= '0;
      cdata_q  <= '0;
      fits_q   <= 1'b0;
      new_q    <= '0;
      old_q    <= '0;
      raw_q    <= '0;
      corr_q   <= '0;
      nerr_q   <= '0;
      uncorr_q <= 1'b0;
    end else begin
      unique case (state)
        E_IDLE: if (iss_valid) begin
          addr_q  <= iss_addr;
          wdata_q <= iss_wdata;
          state   <= iss_write ? E_W_COMP : E_R_REQ;
        end
        E_W_COMP: begin
          cdata_q <= c_stream[CBITS-1:0];
          fits_q  <= (c_len <= CLEN_W'(CBITS));
          state   <= E_W_ENC;
        end
        E_W_ENC: begin
          new_q <= fits_q ? {1'b1, e_data, e_par} : {1'b0, wdata_q};
          state <= E_W_OLD;
        end
        E_W_OLD:  if (pcm_req_ready) state <= E_W_OLDW;
        E_W_OLDW: if (pcm_rsp_valid) begin
          old_q <= pcm_rsp_data;
          state <= E_W_VNR;
        end
        E_W_VNR:  state <= E_W_WAIT;
        E_W_WAIT: if (v_done) state <= E_IDLE;
        E_R_REQ:  if (pcm_req_ready) state <= E_R_WAIT;
        E_R_WAIT: if (pcm_rsp_valid) begin
          raw_q <= pcm_rsp_data;
          state <= E_R_BCH;
        end
        E_R_BCH: begin
          corr_q   <= b_data;
          nerr_q   <= b_nerr;
          uncorr_q <= b_uncorr;
          state    <= E_R_DEC;
        end
        default: state <= E_IDLE;   // E_R_DEC
      endcase
    end
  end

  // responses
  assign resp_valid   = (state == E_R_DEC);
  assign resp_addr    = addr_q;
  assign resp_encoded = raw_q[FLAG_CELL];
  assign resp_data    = raw_q[FLAG_CELL] ? f_line : raw_q[LINE_BITS-1:0];
  assign resp_nerr    = raw_q[FLAG_CELL] && !uncorr_q ? nerr_q : 2'd0;
  assign resp_err     = raw_q[FLAG_CELL] && (uncorr_q || d_err || f_err);

  assign wr_done     = (state == E_W_WAIT) && v_done;
  assign wr_addr     = addr_q;
  assign wr_encoded  = new_q[FLAG_CELL];
  assign wr_verifies = v_nver;
  assign wr_restores = v_nres;
  assign wr_full     = v_full;

endmodule
