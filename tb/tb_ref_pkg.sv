// tb_ref_pkg: reference models used by the testbenches, written apart from
// the RTL so that the two can be compared.
//   fpc_ref_compress  builds an FPC stream with look-ahead zero runs and
//                     signed range tests instead of bit-pattern tests;
//   rand_fpc_line     makes lines whose words hit every FPC pattern;
//   CODE_SLC/CODE_SRMS the (3,4) code books as tables;
//   bch_ref_parity    long division of data(x)*x^20 by g(x) on a bit array;
//   bch_ref_syndrome  evaluates r(alpha^k) by Horner's rule.
package tb_ref_pkg;

  typedef logic [511:0] line_t;
  typedef logic [559:0] stream_t;

  function automatic logic [3:0] code_slc(input int d);
    logic [3:0] t [8] = '{4'b0101, 4'b0110, 4'b0111, 4'b1010,
                          4'b1011, 4'b1101, 4'b1110, 4'b1111};
    return t[d];
  endfunction

  function automatic logic [3:0] code_srms(input int d);
    logic [3:0] t [8] = '{4'b1110, 4'b1100, 4'b1011, 4'b1010,
                          4'b1000, 4'b0011, 4'b0010, 4'b0000};
    return t[d];
  endfunction

  // ---------------- FPC ----------------
  function automatic void put_bits(ref stream_t s, ref int pos, input logic [31:0] v, input int n);
    for (int b = 0; b < n; b++) begin
      s[pos] = v[b];
      pos++;
    end
  endfunction

  function automatic int fits_signed(input logic [31:0] v, input int bits);
    longint sv, lim;
    sv  = longint'($signed(v));
    lim = longint'(1) << (bits - 1);
    return (sv >= -lim && sv < lim) ? 1 : 0;
  endfunction

  function automatic void fpc_ref_compress(input line_t line, output stream_t s, output int len);
    int i, n, pos;
    logic [31:0] w, hi, lo;
    s   = '0;
    pos = 0;
    i   = 0;
    while (i < 16) begin
      w = line[32*i +: 32];
      if (w == 0) begin
        n = 1;
        while (i + n < 16 && line[32*(i+n) +: 32] == 0 && n < 8) n++;
        put_bits(s, pos, 0, 3);
        put_bits(s, pos, n - 1, 3);
        i += n;
      end else begin
        hi = {{16{1'b0}}, w[31:16]};
        lo = {{16{1'b0}}, w[15:0]};
        if (fits_signed(w, 4)) begin
          put_bits(s, pos, 1, 3); put_bits(s, pos, w, 4);
        end else if (fits_signed(w, 8)) begin
          put_bits(s, pos, 2, 3); put_bits(s, pos, w, 8);
        end else if (w == {4{w[7:0]}}) begin
          put_bits(s, pos, 6, 3); put_bits(s, pos, w, 8);
        end else if (fits_signed(w, 16)) begin
          put_bits(s, pos, 3, 3); put_bits(s, pos, w, 16);
        end else if (lo == 0) begin
          put_bits(s, pos, 4, 3); put_bits(s, pos, hi, 16);
        end else if (fits_signed({{16{w[31]}}, w[31:16]}, 8) && fits_signed({{16{w[15]}}, w[15:0]}, 8)) begin
          put_bits(s, pos, 5, 3); put_bits(s, pos, {w[23:16], w[7:0]}, 16);
        end else begin
          put_bits(s, pos, 7, 3); put_bits(s, pos, w, 32);
        end
        i++;
      end
    end
    len = pos;
  endfunction

  function automatic logic [31:0] rand_fpc_word(input int kind);
    logic [31:0] r;
    r = $urandom;
    unique case (kind)
      0: return 0;
      1: return {{28{r[3]}}, r[3:0]};
      2: return {{24{r[7]}}, r[7:0]};
      3: return {4{r[15:8]}};
      4: return {{16{r[15]}}, r[15:0]};
      5: return {r[31:16], 16'd0};
      6: return {{8{r[23]}}, r[23:16], {8{r[7]}}, r[7:0]};
      default: return r;
    endcase
  endfunction

  // kinds drawn with weights; zero_pct raises the share of zero words
  function automatic line_t rand_fpc_line(input int zero_pct, input int raw_pct);
    line_t l;
    int p;
    for (int i = 0; i < 16; i++) begin
      p = $urandom % 100;
      if (p < zero_pct)                l[32*i +: 32] = 0;
      else if (p < zero_pct + raw_pct) l[32*i +: 32] = $urandom;
      else                             l[32*i +: 32] = rand_fpc_word(1 + $urandom % 6);
    end
    return l;
  endfunction

  // ---------------- BCH ----------------
  localparam logic [20:0] G = 21'h101877;

  function automatic logic [19:0] bch_ref_parity(input logic [491:0] d);
    logic [511:0] r;
    r = {d, 20'd0};
    for (int i = 511; i >= 20; i--)
      if (r[i]) r[i -: 21] = r[i -: 21] ^ G;
    return r[19:0];
  endfunction

  function automatic logic [9:0] gf_mul_ref(input logic [9:0] a, input logic [9:0] b);
    logic [19:0] p;
    p = '0;
    for (int i = 0; i < 10; i++) if (b[i]) p ^= 20'(a) << i;
    for (int i = 19; i >= 10; i--) if (p[i]) p[i -: 11] ^= 11'h409;
    return p[9:0];
  endfunction

  function automatic logic [9:0] bch_ref_syndrome(input logic [511:0] r, input int k);
    logic [9:0] ak, s;
    ak = 10'd1;
    for (int i = 0; i < k; i++) ak = gf_mul_ref(ak, 10'd2);
    s = '0;
    for (int j = 511; j >= 0; j--) s = gf_mul_ref(s, ak) ^ 10'(r[j]);
    return s;
  endfunction

endpackage
