// din_decoder: inverse of din_encoder, (3,4) decoding of a stored line.
//
// Each 4-bit group edata[4g+3:4g] is looked up in the code book of MODE and
// replaced by its 3-bit data word cdata[3g+2:3g]. A group that is not a code
// word (possible only if more errors hit the line than the BCH code can
// correct) decodes to 000 and sets its bit in bad_group; err is the OR of
// those bits. Purely combinational. Each group compares its 4 bits with the
// 8 code words at once (a content-addressed match) and turns the one-hot
// match into 3 bits, the structure the DIN scheme describes for its decoder.
module din_decoder
  import din_pkg::*;
#(
  parameter cell_e MODE = CELL_SLC
) (
  input  logic [EBITS-1:0]  edata,
  output logic [CBITS-1:0]  cdata,
  output logic [GROUPS-1:0] bad_group,
  output logic              err
);

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic [3:0] r;
    assign r                        = din_uncode(MODE, edata[CODE_M*g +: CODE_M]);
    assign cdata[CODE_N*g +: CODE_N] = r[2:0];
    assign bad_group[g]             = ~r[3];
  end

  assign err = |bad_group;

endmodule
