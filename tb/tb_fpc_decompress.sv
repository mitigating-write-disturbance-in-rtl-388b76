// tb_fpc_decompress: feeds streams made by the reference FPC encoder of
// tb_ref_pkg to the decompressor and checks that the original line comes
// back, that the consumed length equals the stream length and that err stays
// low. Also checks that err rises when the stream is longer than clen_max
// and when a zero run passes the end of the line.
module tb_fpc_decompress;
  import tb_ref_pkg::*;

  stream_t    cdata;
  logic [9:0] clen_max;
  line_t      line;
  logic [9:0] clen;
  logic       err;
  int checks = 0, failures = 0;

  fpc_decompress dut (.cdata(cdata), .clen_max(clen_max), .line(line), .clen(clen), .err(err));

  task automatic check_line(input line_t l);
    stream_t s;
    int      len;
    fpc_ref_compress(l, s, len);
    cdata    = s;
    clen_max = 10'd560;
    #1;
    checks++;
    if (line !== l || int'(clen) != len || err) begin
      failures++;
      if (failures < 5) $display("FAIL exp=%h got=%h len=%0d/%0d err=%b", l, line, clen, len, err);
    end
    if (len > 11) begin
      clen_max = 10'(len - 1);
      #1;
      checks++;
      if (!err) failures++;
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
    check_line('0);
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 16; i++) l[32*i +: 32] = rand_fpc_word(k);
      check_line(l);
    end
    for (int t = 0; t < 3000; t++) check_line(rand_fpc_line($urandom % 60, $urandom % 40));
    // zero run of 8 starting at word 12 overruns the line
    cdata = '0;
    for (int i = 0; i < 12; i++) cdata[7*i +: 7] = {4'b0101, 3'b001};
    cdata[84 +: 6] = {3'd7, 3'b000};
    clen_max = 10'd560;
    #1;
    checks++;
    if (!err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
