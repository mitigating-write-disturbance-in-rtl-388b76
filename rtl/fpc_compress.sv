// fpc_compress: Frequent Pattern Compression of one 64-byte line.
//
// The line is cut into sixteen 32-bit words (word i = line[32i+31:32i]).
// Each word becomes a token: a 3-bit prefix followed by a payload.
//   000 run of 1..8 zero words, payload = run length - 1 (3 bits)
//   001 value fits a 4-bit signed number          (4 bits)
//   010 value fits an 8-bit signed number         (8 bits)
//   110 the same byte repeated four times         (8 bits)
//   011 value fits a 16-bit signed number         (16 bits)
//   100 low halfword is zero, payload = high half (16 bits)
//   101 each halfword is a sign-extended byte     (16 bits, {hi byte, lo byte})
//   111 anything else, the word itself            (32 bits)
// The shortest matching pattern wins, in the order listed. Tokens are packed
// from bit 0 upwards: prefix first (prefix bit 0 lowest), then payload. A
// zero run is emitted at the position of its last word.
//
// The line is compressed by FPC in the DIN write path; the pattern set is the
// standard FPC one, chosen here because only the name of the scheme is
// fixed. Purely combinational: clen is the number of valid bits of cdata
// (at most 560); unused bits of cdata are zero.
module fpc_compress
  import din_pkg::*;
(
  input  line_t                     line,
  output logic [FPC_MAXB-1:0]       cdata,
  output logic [CLEN_W-1:0]         clen
);

  logic [31:0] w     [FPC_WORDS];
  logic        zero  [FPC_WORDS];
  logic [2:0]  runpos[FPC_WORDS];   // index of the word inside its zero run

  always_comb begin
    logic [2:0] rp;
    logic       prev_zero;
    rp        = 3'd0;
    prev_zero = 1'b0;
    for (int i = 0; i < FPC_WORDS; i++) begin
      w[i]    = line[32*i +: 32];
      zero[i] = (w[i] == 32'd0);
      if (zero[i] && prev_zero && rp != 3'd7) rp = rp + 3'd1;
      else                                    rp = 3'd0;
      runpos[i] = rp;
      prev_zero = zero[i];
    end
  end

  always_comb begin
    logic [34:0]       tok;
    int unsigned       tlen;
    int unsigned       pos;
    logic              run_end;
    logic [31:0]       x;
    logic [FPC_MAXB-1:0] ext;
    cdata   = '0;
    pos     = 0;
    run_end = 1'b0;
    ext     = '0;
    for (int i = 0; i < FPC_WORDS; i++) begin
      x    = w[i];
      tok  = '0;
      tlen = 0;
      run_end = 1'b0;
      if (zero[i]) begin
        run_end = (i == FPC_WORDS - 1) || !zero[(i + 1) % FPC_WORDS] || runpos[i] == 3'd7;
        if (run_end) begin
          tok  = {29'd0, runpos[i], 3'b000};
          tlen = 6;
        end
      end else if (&x[31:3] || ~|x[31:3]) begin
        tok = {28'd0, x[3:0], 3'b001};           tlen = 7;
      end else if (&x[31:7] || ~|x[31:7]) begin
        tok = {24'd0, x[7:0], 3'b010};           tlen = 11;
      end else if (x[31:24] == x[7:0] && x[23:16] == x[7:0] && x[15:8] == x[7:0]) begin
        tok = {24'd0, x[7:0], 3'b110};           tlen = 11;
      end else if (&x[31:15] || ~|x[31:15]) begin
        tok = {16'd0, x[15:0], 3'b011};          tlen = 19;
      end else if (x[15:0] == 16'd0) begin
        tok = {16'd0, x[31:16], 3'b100};         tlen = 19;
      end else if ((&x[31:23] || ~|x[31:23]) && (&x[15:7] || ~|x[15:7])) begin
        tok = {16'd0, x[23:16], x[7:0], 3'b101}; tlen = 19;
      end else begin
        tok = {x, 3'b111};                       tlen = 35;
      end
      ext   = FPC_MAXB'(tok);
      cdata = cdata | (ext << pos);
      pos   = pos + tlen;
    end
    clen = CLEN_W'(pos);
  end

endmodule
