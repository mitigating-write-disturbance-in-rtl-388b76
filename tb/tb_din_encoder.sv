// tb_din_encoder: checks both (3,4) code books (SLC/SSMR and SRMS) against
// tables held in the testbench, group by group, on random and directed
// inputs, and checks the insulation property of every encoded group: no
// "00" inside an SLC code word, no 2-bit cell holding "01" for SRMS.
module tb_din_encoder;
  import din_pkg::*;
  import tb_ref_pkg::code_slc;
  import tb_ref_pkg::code_srms;

  logic [CBITS-1:0] cdata;
  logic [EBITS-1:0] e_slc, e_srms;
  int checks = 0, failures = 0;

  din_encoder #(.MODE(CELL_SLC))  u_slc  (.cdata(cdata), .edata(e_slc));
  din_encoder #(.MODE(CELL_SRMS)) u_srms (.cdata(cdata), .edata(e_srms));

  task automatic check();
    int d;
    logic [3:0] a, b;
    #1;
    for (int g = 0; g < GROUPS; g++) begin
      d = int'(cdata[3*g +: 3]);
      a = e_slc[4*g +: 4];
      b = e_srms[4*g +: 4];
      checks += 4;
      if (a != code_slc(d))  failures++;
      if (b != code_srms(d)) failures++;
      if (a[3:2] == 2'b00 || a[2:1] == 2'b00 || a[1:0] == 2'b00) failures++;
      if (b[3:2] == 2'b01 || b[1:0] == 2'b01) failures++;
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
    cdata = '0; check();
    cdata = '1; check();
    for (int d = 0; d < 8; d++) begin
      for (int g = 0; g < GROUPS; g++) cdata[3*g +: 3] = 3'(d + g);
      check();
    end
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < CBITS; i++) cdata[i] = 1'($urandom);
      check();
    end
    // data word 000 in the lowest group: 0101 (SLC) and 1110 (SRMS)
    cdata = '1; cdata[2:0] = 3'b000; #1;
    checks++;
    if (e_slc[3:0] != 4'b0101 || e_srms[3:0] != 4'b1110) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
