// tb_fpc_compress: checks the FPC compressor against the reference encoder
// of tb_ref_pkg on directed lines (all zero, long zero runs, one word of
// each pattern, fully random) and on random lines mixing all patterns.
// Both the stream bits and the compressed length must match exactly.
module tb_fpc_compress;
  import tb_ref_pkg::*;

  line_t        line;
  logic [559:0] cdata;
  logic [9:0]   clen;
  int checks = 0, failures = 0;

  fpc_compress dut (.line(line), .cdata(cdata), .clen(clen));

  task automatic check_line(input line_t l);
    stream_t exp;
    int      elen;
    line = l;
    #1;
    fpc_ref_compress(l, exp, elen);
    checks++;
    if (cdata !== exp || int'(clen) != elen) begin
      failures++;
      if (failures < 5) $display("FAIL line=%h clen=%0d exp=%0d", l, clen, elen);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t l;
    // all zero: two runs of eight words, 12 bits
    check_line('0);
    checks++;
    if (clen != 10'd12 || cdata[11:0] != {3'd7, 3'b000, 3'd7, 3'b000}) failures++;
    // random incompressible words: 16 * 35 bits
    for (int i = 0; i < 16; i++) l[32*i +: 32] = 32'h8000_0001 + 32'($urandom % 1000) * 32'h0001_0003;
    check_line(l);
    checks++;
    if (clen != 10'd560) failures++;
    // one of each pattern
    for (int k = 0; k < 8; k++) begin
      l = '0;
      for (int i = 0; i < 16; i++) l[32*i +: 32] = rand_fpc_word(k);
      check_line(l);
    end
    // zero runs of every length at every position
    for (int s = 0; s < 16; s++)
      for (int n = 1; n <= 16 - s; n++) begin
        for (int i = 0; i < 16; i++) l[32*i +: 32] = 32'h1234_5678 + 32'(i);
        for (int i = s; i < s + n; i++) l[32*i +: 32] = 0;
        check_line(l);
      end
    // random mixtures
    for (int t = 0; t < 3000; t++) check_line(rand_fpc_line($urandom % 60, $urandom % 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
