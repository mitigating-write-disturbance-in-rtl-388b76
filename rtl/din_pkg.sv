// din_pkg: types, sizes and functions shared by the DIN write-disturbance
// mitigation datapath.
//
// A 64-byte memory line is first compressed with Frequent Pattern
// Compression (FPC). If the compressed stream fits in CBITS = 369 bits it is
// split into 3-bit groups, each replaced by a 4-bit code word that avoids the
// write-disturbance-prone cell pattern, giving EBITS = 492 bits. A 20-bit
// systematic BCH parity (2-error correcting, GF(2^10)) is appended so that the
// stored line is exactly 512 cells, plus one cell that flags an encoded line.
// Uncompressible lines are stored raw (512 cells, flag = 0). The package
// also holds the FPC payload-size table used by the decompressor, and the
// verify-and-restore limits (five rounds, two errors left to the BCH code).
//
// The code books are the ones the design defines for each cell technology:
//   SLC and SSMR 2-bit MLC: 4-bit codes that contain no "00";
//   SRMS 2-bit MLC:         4-bit codes in which no 2-bit cell holds "01".
// Group g of 3 data bits is stored as code bits [4g+3:4g] of the encoded
// stream, code bit 0 in the lowest cell. For 2-bit MLC, stream bits
// {2k+1, 2k} form one cell, bit 2k+1 being the cell's first (left) bit. The GF(2^10) helpers use the
// primitive polynomial x^10 + x^3 + 1 (a design choice).
package din_pkg;

  localparam int unsigned LINE_BITS = 512;          // 64B line
  localparam int unsigned CELLS     = LINE_BITS + 1; // + "encoded" flag cell
  localparam int unsigned FLAG_CELL = LINE_BITS;     // index of the flag cell
  localparam int unsigned CODE_N    = 3;            // (n,m) = (3,4)
  localparam int unsigned CODE_M    = 4;
  localparam int unsigned BCH_BITS  = 20;
  localparam int unsigned EBITS     = LINE_BITS - BCH_BITS;        // 492
  localparam int unsigned GROUPS    = EBITS / CODE_M;              // 123
  localparam int unsigned CBITS     = GROUPS * CODE_N;             // 369
  localparam int unsigned CLEN_W    = 10;   // width of a compressed length (0..1023)

  localparam int unsigned ADDR_W    = 27;  // 8GB / 64B lines
  localparam int unsigned MAX_VNR   = 5;   // verify-and-restore rounds
  localparam int unsigned ENC_TOL   = 2;   // errors left to the BCH code

  // Cell technology; selects the code book and the verify policy.
  typedef enum logic [1:0] {
    CELL_SLC  = 2'd0,
    CELL_SSMR = 2'd1,
    CELL_SRMS = 2'd2
  } cell_e;

  typedef logic [LINE_BITS-1:0] line_t;
  typedef logic [CELLS-1:0]     cells_t;

  // ---------------------------------------------------------------------
  // (3,4) code books
  // ---------------------------------------------------------------------
  function automatic logic [3:0] din_code(input cell_e mode, input logic [2:0] d);
    logic [3:0] c;
    if (mode == CELL_SRMS) begin
      unique case (d)
        3'b000: c = 4'b1110;  3'b001: c = 4'b1100;
        3'b010: c = 4'b1011;  3'b011: c = 4'b1010;
        3'b100: c = 4'b1000;  3'b101: c = 4'b0011;
        3'b110: c = 4'b0010;  default: c = 4'b0000;
      endcase
    end else begin
      unique case (d)
        3'b000: c = 4'b0101;  3'b001: c = 4'b0110;
        3'b010: c = 4'b0111;  3'b011: c = 4'b1010;
        3'b100: c = 4'b1011;  3'b101: c = 4'b1101;
        3'b110: c = 4'b1110;  default: c = 4'b1111;
      endcase
    end
    return c;
  endfunction

  // Reverse lookup. valid = 0 for a 4-bit pattern outside the code book.
  function automatic logic [3:0] din_uncode(input cell_e mode, input logic [3:0] c);
    // returns {valid, data[2:0]}
    logic [3:0] r;
    r = 4'b0000;
    for (int d = 0; d < 8; d++)
      if (din_code(mode, 3'(d)) == c) r = {1'b1, 3'(d)};
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // GF(2^10) arithmetic for the BCH code
  // ---------------------------------------------------------------------
  localparam int unsigned GF_M = 10;
  typedef logic [GF_M-1:0] gf_t;
  localparam logic [GF_M:0] GF_PRIM = 11'h409;     // x^10 + x^3 + 1
  // g(x) = m1(x) * m3(x), m1 = 0x409, m3 = 0x40F (x^10+x^3+x^2+x+1)
  localparam logic [BCH_BITS:0] BCH_GEN = 21'h101877;

  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t r, x;
    r = '0;
    x = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) r ^= x;
      x = x[GF_M-1] ? ((x << 1) ^ GF_PRIM[GF_M-1:0]) : (x << 1);
    end
    return r;
  endfunction

  // alpha^e for 0 <= e < 1023
  function automatic gf_t gf_pow_alpha(input int unsigned e);
    gf_t r;
    r = gf_t'(1);
    for (int unsigned i = 0; i < e; i++)
      r = r[GF_M-1] ? ((r << 1) ^ GF_PRIM[GF_M-1:0]) : (r << 1);
    return r;
  endfunction

  // Table of alpha^(k*j), j = 0 .. LINE_BITS-1, for the BCH syndromes and the
  // per-position error locator evaluation. Built once at elaboration.
  typedef logic [LINE_BITS-1:0][GF_M-1:0] gf_tab_t;

  function automatic gf_tab_t gf_table(input int unsigned k);
    gf_tab_t t;
    gf_t     ak;
    ak   = gf_pow_alpha(k);
    t[0] = gf_t'(1);
    for (int unsigned j = 1; j < LINE_BITS; j++)
      t[j] = gf_mul(t[j-1], ak);
    return t;
  endfunction

  // Number of FPC payload bits that follow a 3-bit prefix.
  function automatic int unsigned fpc_payload_bits(input logic [2:0] prefix);
    unique case (prefix)
      3'b000: return 3;    // zero run, run length - 1
      3'b001: return 4;    // 4-bit sign-extended
      3'b010: return 8;    // 8-bit sign-extended
      3'b011: return 16;   // 16-bit sign-extended
      3'b100: return 16;   // upper halfword, lower halfword zero
      3'b101: return 16;   // two sign-extended bytes in two halfwords
      3'b110: return 8;    // one byte repeated four times
      default: return 32;  // uncompressed word
    endcase
  endfunction

  localparam int unsigned FPC_WORDS = LINE_BITS / 32;        // 16
  localparam int unsigned FPC_MAXB  = FPC_WORDS * (3 + 32);  // 560, worst case

endpackage
