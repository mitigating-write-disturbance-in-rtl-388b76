// tb_din_decoder: encodes random data with the testbench's own code book
// tables, decodes it with din_decoder for both code books and checks the
// data and a clear error flag; then corrupts single groups into patterns
// outside the code book and checks that exactly those groups are flagged.
module tb_din_decoder;
  import din_pkg::*;
  import tb_ref_pkg::code_slc;
  import tb_ref_pkg::code_srms;

  logic [EBITS-1:0]  e_slc, e_srms;
  logic [CBITS-1:0]  d_slc, d_srms;
  logic [GROUPS-1:0] bad_slc, bad_srms;
  logic              err_slc, err_srms;
  logic [CBITS-1:0]  data;
  int checks = 0, failures = 0;

  din_decoder #(.MODE(CELL_SLC))  u_slc  (.edata(e_slc),  .cdata(d_slc),  .bad_group(bad_slc),  .err(err_slc));
  din_decoder #(.MODE(CELL_SRMS)) u_srms (.edata(e_srms), .cdata(d_srms), .bad_group(bad_srms), .err(err_srms));

  task automatic encode();
    for (int g = 0; g < GROUPS; g++) begin
      e_slc[4*g +: 4]  = code_slc(int'(data[3*g +: 3]));
      e_srms[4*g +: 4] = code_srms(int'(data[3*g +: 3]));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < CBITS; i++) data[i] = 1'($urandom);
      encode();
      #1;
      checks += 2;
      if (d_slc != data || err_slc || bad_slc != '0) failures++;
      if (d_srms != data || err_srms || bad_srms != '0) failures++;
      // break one group in each: 0000 / 0100 are in neither SLC nor SRMS? use
      // patterns outside each book: SLC 0011 (has 00), SRMS 0101 (has 01)
      g = $urandom % GROUPS;
      e_slc[4*g +: 4]  = 4'b0011;
      e_srms[4*g +: 4] = 4'b0101;
      #1;
      checks += 2;
      if (!err_slc  || bad_slc  != (GROUPS'(1) << g)) failures++;
      if (!err_srms || bad_srms != (GROUPS'(1) << g)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
