// din_encoder: (3,4) data-insulation encoding of a compressed line.
//
// The compressed stream (CBITS = 369 bits) is cut into 123 groups of three
// bits; group g (cdata[3g+2:3g]) is replaced by the 4-bit code word
// edata[4g+3:4g] from the code book of the cell technology MODE:
//   SLC / SSMR MLC: 000->0101 001->0110 010->0111 011->1010
//                   100->1011 101->1101 110->1110 111->1111  (no "00")
//   SRMS MLC:       000->1110 001->1100 010->1011 011->1010
//                   100->1000 101->0011 110->0010 111->0000  (no "01" cell)
// One small lookup per group, all groups in parallel: purely combinational.
// The bit order inside a group (code bit 0 in the lowest cell) is this
// design's choice.
// The code books are the design's; the group count follows from filling a
// 492-bit field, which leaves room for the 20-bit BCH parity in 512 cells.
module din_encoder
  import din_pkg::*;
#(
  parameter cell_e MODE = CELL_SLC
) (
  input  logic [CBITS-1:0] cdata,
  output logic [EBITS-1:0] edata
);

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    assign edata[CODE_M*g +: CODE_M] = din_code(MODE, cdata[CODE_N*g +: CODE_N]);
  end

endmodule
