// tb_bch_encoder: compares the parity with a long division done in the
// testbench and checks that every codeword {data, parity} has zero
// syndromes at alpha and alpha^3 (evaluated by Horner's rule), i.e. that it
// is a codeword of the 2-error-correcting BCH code.
module tb_bch_encoder;
  import din_pkg::*;
  import tb_ref_pkg::*;

  logic [EBITS-1:0]    data;
  logic [BCH_BITS-1:0] parity;
  int checks = 0, failures = 0;

  bch_encoder dut (.data(data), .parity(parity));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      if (t < 40) begin
        data = '0;
        if (t > 0) data[$urandom % EBITS] = 1'b1;
      end else begin
        for (int i = 0; i < EBITS; i++) data[i] = 1'($urandom);
      end
      #1;
      checks += 3;
      if (parity != bch_ref_parity(data)) failures++;
      if (bch_ref_syndrome({data, parity}, 1) != 0) failures++;
      if (bch_ref_syndrome({data, parity}, 3) != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
