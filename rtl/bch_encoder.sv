// bch_encoder: systematic 2-error-correcting binary BCH encoder.
//
// The code is a shortened BCH code over GF(2^10) with generator
// g(x) = m1(x) * m3(x) = 0x101877 (degree 20), so the parity is 20 bits and
// the codeword is the 492 data bits followed by the parity:
//   codeword = {data, parity},  parity = (data(x) * x^20) mod g(x),
// where codeword bit j is the coefficient of x^j. Being systematic, it keeps
// the (3,4)-encoded data cells as they are. The division is unrolled into
// one XOR network (a bit-serial LFSR step per data bit): purely combinational.
// The 20-bit, 2-error-correcting, systematic code follows the DIN scheme;
// the field, primitive polynomial and generator are this design's choice.
module bch_encoder
  import din_pkg::*;
(
  input  logic [EBITS-1:0]    data,
  output logic [BCH_BITS-1:0] parity
);

  always_comb begin
    logic [BCH_BITS-1:0] rem;
    logic                fb;
    rem = '0;
    for (int i = EBITS - 1; i >= 0; i--) begin
      fb  = data[i] ^ rem[BCH_BITS-1];
      rem = rem << 1;
      if (fb) rem ^= BCH_GEN[BCH_BITS-1:0];
    end
    parity = rem;
  end

endmodule
