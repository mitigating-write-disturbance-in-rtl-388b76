// bch_decoder: syndrome check and correction of up to two errors for the
// 512-bit BCH codeword produced by bch_encoder.
//
// Syndromes S1 = r(alpha) and S3 = r(alpha^3) are XOR sums of constants.
// With X1, X2 the error locations, S1 = X1 + X2 and
// S3 + S1^3 = S1 * X1 * X2, so every error location z = alpha^j is a root of
//   S1*z^2 + S1^2*z + (S3 + S1^3) = 0,
// a form that needs no GF division. The polynomial is evaluated at all 512
// positions in parallel (each a constant multiply), and the roots are the
// bits to flip. No root search is iterated: the decoder is combinational.
//   S1 = S3 = 0              -> no error
//   S1 != 0, one root when S3 = S1^3, two roots otherwise -> corrected
//   anything else            -> uncorrectable (uncorr = 1, data passed as read)
// Three errors are flagged whenever they do not alias a 1- or 2-error
// pattern; a distance-5 code cannot guarantee more (the scheme asks for
// 3-error detection within 20 bits, which this meets only in part). The
// decoding method itself is this design's own.
module bch_decoder
  import din_pkg::*;
(
  input  line_t       rdata,
  output line_t       cdata,
  output logic [1:0]  nerr,
  output logic        uncorr
);

  localparam gf_tab_t A1 = gf_table(1);
  localparam gf_tab_t A2 = gf_table(2);
  localparam gf_tab_t A3 = gf_table(3);

  gf_t   s1, s3, s1sq, tcoef;
  line_t root;

  always_comb begin
    s1 = '0;
    s3 = '0;
    for (int j = 0; j < LINE_BITS; j++) begin
      if (rdata[j]) begin
        s1 ^= A1[j];
        s3 ^= A3[j];
      end
    end
    s1sq  = gf_mul(s1, s1);
    tcoef = s3 ^ gf_mul(s1sq, s1);
  end

  for (genvar j = 0; j < LINE_BITS; j++) begin : g_pos
    assign root[j] = (s1 != '0) &&
                     ((gf_mul(s1, A2[j]) ^ gf_mul(s1sq, A1[j]) ^ tcoef) == '0);
  end

  always_comb begin
    int unsigned cnt;
    cnt = 0;
    for (int j = 0; j < LINE_BITS; j++) cnt += 32'(root[j]);
    if (s1 == '0 && s3 == '0) begin
      nerr   = 2'd0;
      uncorr = 1'b0;
      cdata  = rdata;
    end else if (s1 != '0 && ((tcoef == '0 && cnt == 1) || (tcoef != '0 && cnt == 2))) begin
      nerr   = 2'(cnt);
      uncorr = 1'b0;
      cdata  = rdata ^ root;
    end else begin
      nerr   = 2'd3;
      uncorr = 1'b1;
      cdata  = rdata;
    end
  end

endmodule
