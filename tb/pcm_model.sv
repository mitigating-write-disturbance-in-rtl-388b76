// pcm_model: behavioural model of a PCM chip word-line with write
// disturbance, for testbenches only (not synthesizable: associative array,
// $urandom).
//
// Each line holds 513 cells (512 data cells and the encoding flag cell);
// unwritten lines read as all zeros. A program request sets the cells in
// req_mask to req_data; the other cells of the line are idle. Disturbance:
//   SLC:  a cell programmed to 0 (RESET) may turn an idle neighbour that
//         holds 0 into 1;
//   SSMR: a 2-bit cell {b[2k+1], b[2k]} programmed to 00 (full RESET) may
//         move an idle neighbour cell that is not 10 one resistance level
//         towards crystalline (00 -> 01 -> 11 -> 10);
//   SRMS: every programmed cell is RESET first, with the same effect.
// Each vulnerable neighbour is disturbed with probability dist_pct percent.
// The flag cell is never disturbed. A request is accepted when req_ready is
// high; a program keeps the model busy for WR_LAT cycles, a read answers
// with rsp_valid RD_LAT cycles nxt it was accepted.
module pcm_model
  import din_pkg::*;
#(
  parameter int unsigned RD_LAT = 2,
  parameter int unsigned WR_LAT = 3
) (
  input  logic              clk,
  input  cell_e             mode,
  input  int unsigned       dist_pct,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  logic [ADDR_W-1:0] req_addr,
  input  cells_t            req_mask,
  input  cells_t            req_data,
  output logic              rsp_valid,
  output cells_t            rsp_data,
  output int unsigned       n_prog,
  output int unsigned       n_read,
  output int unsigned       n_disturbed
);

  cells_t mem [logic [ADDR_W-1:0]];
  int unsigned busy;
  int unsigned rd_cnt;
  logic [ADDR_W-1:0] rd_addr;

  initial begin
    busy        = 0;
    rd_cnt      = 0;
    n_prog      = 0;
    n_read      = 0;
    n_disturbed = 0;
    rsp_valid   = 1'b0;
    rsp_data    = '0;
  end

  assign req_ready = (busy == 0);

  function automatic cells_t line_of(input logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic logic hit();
    return ($urandom % 100) < dist_pct;
  endfunction

  task automatic program_line(input logic [ADDR_W-1:0] a, input cells_t m, input cells_t d);
    cells_t cur, nxt;
    cur = line_of(a);
    nxt  = (cur & ~m) | (d & m);
    if (mode == CELL_SLC) begin
      for (int i = 0; i < LINE_BITS; i++) begin
        if (m[i] && !d[i]) begin
          for (int s = -1; s <= 1; s += 2) begin
            int j;
            j = i + s;
            if (j >= 0 && j < LINE_BITS && !m[j] && !nxt[j] && hit()) begin
              nxt[j] = 1'b1;
              n_disturbed++;
            end
          end
        end
      end
    end else begin
      for (int k = 0; k < LINE_BITS / 2; k++) begin
        logic prog_k, reset_k;
        prog_k  = m[2*k] || m[2*k+1];
        reset_k = prog_k && (mode == CELL_SRMS || d[2*k +: 2] == 2'b00);
        if (reset_k) begin
          for (int s = -1; s <= 1; s += 2) begin
            int j;
            logic [1:0] v;
            j = k + s;
            if (j >= 0 && j < LINE_BITS / 2 && !m[2*j] && !m[2*j+1]) begin
              v = nxt[2*j +: 2];
              if (v != 2'b10 && hit()) begin
                unique case (v)
                  2'b00:   nxt[2*j +: 2] = 2'b01;
                  2'b01:   nxt[2*j +: 2] = 2'b11;
                  default: nxt[2*j +: 2] = 2'b10;
                endcase
                n_disturbed++;
              end
            end
          end
        end
      end
    end
    mem[a] = nxt;
  endtask

  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (busy > 0) begin
      busy <= busy - 1;
      if (rd_cnt > 0) begin
        rd_cnt <= rd_cnt - 1;
        if (rd_cnt == 1) begin
          rsp_valid <= 1'b1;
          rsp_data  <= line_of(rd_addr);
        end
      end
    end else if (req_valid) begin
      if (req_write) begin
        program_line(req_addr, req_mask, req_data);
        n_prog <= n_prog + 1;
        busy   <= WR_LAT;
      end else begin
        rd_addr <= req_addr;
        rd_cnt  <= RD_LAT;
        busy    <= RD_LAT;
        n_read  <= n_read + 1;
      end
    end
  end

endmodule
