// tb_bch_decoder: builds codewords with the testbench's own BCH division,
// flips 0, 1 or 2 random bits (data or parity) and checks that the decoder
// returns the original codeword with the right error count. With 3 flipped
// bits the decoder must never report a clean or wrongly "corrected" word as
// error-free; it either flags it or miscorrects, and the share it flags is
// reported.
module tb_bch_decoder;
  import din_pkg::*;
  import tb_ref_pkg::*;

  line_t      rdata, cdata;
  logic [1:0] nerr;
  logic       uncorr;
  int checks = 0, failures = 0, flagged3 = 0;

  bch_decoder dut (.rdata(rdata), .cdata(cdata), .nerr(nerr), .uncorr(uncorr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [491:0] d;
    line_t cw, e;
    int p1, p2, p3;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 492; i++) d[i] = 1'($urandom);
      cw = {d, bch_ref_parity(d)};
      for (int ne = 0; ne <= 3; ne++) begin
        e  = '0;
        p1 = $urandom % 512;
        p2 = (p1 + 1 + $urandom % 511) % 512;
        p3 = p1;
        while (p3 == p1 || p3 == p2) p3 = $urandom % 512;
        if (t == 0) begin p1 = 0; p2 = 511; end   // both ends
        if (ne >= 1) e[p1] = 1'b1;
        if (ne >= 2) e[p2] = 1'b1;
        if (ne >= 3) e[p3] = 1'b1;
        rdata = cw ^ e;
        #1;
        checks++;
        if (ne <= 2) begin
          if (cdata != cw || nerr != 2'(ne) || uncorr) begin
            failures++;
            if (failures < 5) $display("FAIL ne=%0d nerr=%0d uncorr=%b", ne, nerr, uncorr);
          end
        end else begin
          if (!uncorr && nerr == 0) failures++;
          if (uncorr) flagged3++;
        end
      end
    end
    $display("3-error words flagged: %0d of 400", flagged3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
