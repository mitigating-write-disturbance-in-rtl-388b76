// tb_din_wd_eval: counts write-disturbance-vulnerable cells per line write
// (SLC) for three ways of storing the same stream of lines:
//   BASE  line stored as is, only changed cells programmed;
//   INV   line inverted when it holds more 0s than 1s (one extra flag cell);
//   DIN   the RTL write path: fpc_compress -> din_encoder -> bch_encoder,
//         raw when the line does not compress to 369 bits.
// A cell is vulnerable when it is idle in the write, holds 0, and a
// neighbour is RESET (programmed to 0). Two line streams are used: an
// integer-like one (small values, zero words) and a floating-point-like one
// (doubles near 1.0, mostly with 20-bit mantissas: compressible, but the
// high words hold about as many 0s as 1s). Each stream rewrites 16
// lines many times. Checks: on writes where DIN replaces an encoded line by
// an encoded line, DIN's average is below half of BASE's on the same writes,
// for both streams, and no vulnerable cell of an encoded DIN line lies inside one
// 4-bit code word. The averages and maxima are printed.
module tb_din_wd_eval;
  import din_pkg::*;
  import tb_ref_pkg::rand_fpc_line;

  line_t               line;
  logic [FPC_MAXB-1:0] cstream;
  logic [CLEN_W-1:0]   clen;
  logic [EBITS-1:0]    edata;
  logic [BCH_BITS-1:0] par;
  int checks = 0, failures = 0;

  fpc_compress u_c (.line(line), .cdata(cstream), .clen(clen));
  din_encoder  u_e (.cdata(cstream[CBITS-1:0]), .edata(edata));
  bch_encoder  u_b (.data(edata), .parity(par));

  // vulnerable cells of one write; inside_code counts those whose RESET
  // neighbour lies in the same 4-bit group of the encoded field
  function automatic int vulnerable(input cells_t oldc, input cells_t newc, output int inside_code);
    cells_t m;
    int n;
    logic hit;
    m = oldc ^ newc;
    n = 0;
    inside_code = 0;
    for (int j = 0; j < CELLS; j++) begin
      if (!m[j] && !newc[j]) begin
        hit = 1'b0;
        if (j > 0 && m[j-1] && !newc[j-1]) begin
          hit = 1'b1;
          if (j >= BCH_BITS + 1 && j < LINE_BITS && (j - 1 - BCH_BITS) / 4 == (j - BCH_BITS) / 4) inside_code++;
        end
        if (j < CELLS - 1 && m[j+1] && !newc[j+1]) begin
          hit = 1'b1;
          if (j >= BCH_BITS && j + 1 < LINE_BITS && (j + 1 - BCH_BITS) / 4 == (j - BCH_BITS) / 4) inside_code++;
        end
        if (hit) n++;
      end
    end
    return n;
  endfunction

  function automatic line_t float_line();
    line_t l;
    for (int i = 0; i < 8; i++) begin
      logic [63:0] d;
      d = {1'b0, 11'h3F0 + 11'($urandom % 32), 20'($urandom), 32'($urandom)};
      if ($urandom % 8 != 0) d[31:0] = '0;   // mostly short mantissas
      l[64*i +: 64] = d;
    end
    return l;
  endfunction

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    string names[2] = '{"integer-like", "float-like"};
    for (int s = 0; s < 2; s++) begin
      cells_t base_m[16], inv_m[16], din_m[16];
      longint sum_b, sum_i, sum_d, enc_b, enc_d;
      int     n_enc;
      int max_b, max_i, max_d, n, enc, n_inside, dummy;
      sum_b = 0; sum_i = 0; sum_d = 0; enc_b = 0; enc_d = 0; n_enc = 0;
      max_b = 0; max_i = 0; max_d = 0; n = 0; enc = 0; n_inside = 0;
      for (int a = 0; a < 16; a++) begin base_m[a] = '0; inv_m[a] = '0; din_m[a] = '0; end
      for (int t = 0; t < 1200; t++) begin
        int a, vb, vi, vd, ins;
        cells_t cb, ci, cd;
        logic   din_m_prev_enc;
        a    = $urandom % 16;
        line = (s == 0) ? rand_fpc_line(25, 5) : float_line();
        #1;
        cb = {1'b0, line};
        ci = ($countones(line) < LINE_BITS / 2) ? {1'b1, ~line} : {1'b0, line};
        cd = (clen <= CLEN_W'(CBITS)) ? {1'b1, edata, par} : {1'b0, line};
        vb = vulnerable(base_m[a], cb, dummy);
        vi = vulnerable(inv_m[a], ci, dummy);
        vd = vulnerable(din_m[a], cd, ins);
        if (cd[FLAG_CELL]) begin
          enc++;
          n_inside += ins;
        end
        din_m_prev_enc = din_m[a][FLAG_CELL];
        base_m[a] = cb; inv_m[a] = ci; din_m[a] = cd;
        if (t >= 16) begin   // skip the first writes into empty lines
          n++;
          sum_b += vb; sum_i += vi; sum_d += vd;
          if (vb > max_b) max_b = vb;
          if (vi > max_i) max_i = vi;
          if (vd > max_d) max_d = vd;
          if (cd[FLAG_CELL] && din_m_prev_enc) begin
            n_enc++;
            enc_b += vb;
            enc_d += vd;
          end
        end
      end
      $display("%-12s vulnerable cells per write: BASE avg %0.1f max %0d | INV avg %0.1f max %0d | DIN avg %0.1f max %0d | encoded %0d of 1200",
               names[s], real'(sum_b) / n, max_b, real'(sum_i) / n, max_i, real'(sum_d) / n, max_d, enc);
      $display("%-12s encoded-over-encoded writes: %0d, BASE avg %0.1f, DIN avg %0.1f",
               names[s], n_enc, real'(enc_b) / n_enc, real'(enc_d) / n_enc);
      checks += 3;
      if (n_enc == 0 || real'(enc_d) >= 0.5 * real'(enc_b)) begin failures++; $display("FAIL DIN not below half of BASE"); end
      if (n_inside != 0) begin failures++; $display("FAIL %0d vulnerable cells inside code words", n_inside); end
      if (enc == 0) begin failures++; $display("FAIL no line encoded"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
