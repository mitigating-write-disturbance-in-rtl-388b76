// fpc_decompress: rebuilds a 64-byte line from its Frequent Pattern
// Compression stream (format in fpc_compress.sv).
//
// Tokens are parsed one after another from bit 0; each yields one word or a
// run of zero words, so at most sixteen tokens are read. Purely
// combinational. err is raised when the stream runs past the limit given in
// clen_max or a zero run would pass the sixteenth word; the line is then not
// meaningful. clen reports how many stream bits were consumed.
module fpc_decompress
  import din_pkg::*;
(
  input  logic [FPC_MAXB-1:0] cdata,
  input  logic [CLEN_W-1:0]   clen_max,
  output line_t               line,
  output logic [CLEN_W-1:0]   clen,
  output logic                err
);

  always_comb begin
    int unsigned   pos;
    int unsigned   wi;
    logic [2:0]    pre;
    logic [31:0]   pay;
    logic [31:0]   word;
    logic [FPC_MAXB+34:0] pad;
    pad  = {35'd0, cdata};
    line = '0;
    pos  = 0;
    wi   = 0;
    err  = 1'b0;
    for (int t = 0; t < FPC_WORDS; t++) begin
      if (wi < FPC_WORDS) begin
        pre  = pad[pos +: 3];
        pay  = pad[pos + 3 +: 32];
        word = '0;
        unique case (pre)
          3'b000: word = '0;
          3'b001: word = {{28{pay[3]}}, pay[3:0]};
          3'b010: word = {{24{pay[7]}}, pay[7:0]};
          3'b011: word = {{16{pay[15]}}, pay[15:0]};
          3'b100: word = {pay[15:0], 16'd0};
          3'b101: word = {{8{pay[15]}}, pay[15:8], {8{pay[7]}}, pay[7:0]};
          3'b110: word = {4{pay[7:0]}};
          default: word = pay;
        endcase
        if (pre == 3'b000) begin
          if (wi + 32'(pay[2:0]) + 1 > FPC_WORDS) err = 1'b1;
          wi = wi + 32'(pay[2:0]) + 1;
        end else begin
          line[32*(wi % FPC_WORDS) +: 32] = word;
          wi = wi + 1;
        end
        pos = pos + 3 + fpc_payload_bits(pre);
      end
    end
    if (pos > clen_max) err = 1'b1;
    clen = CLEN_W'(pos);
  end

endmodule
