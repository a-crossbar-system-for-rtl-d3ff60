// tb_decoder_4_16: exhaustive test of the 4-to-16 destination decoder.
// All 32 combinations of request and destination number are applied and
// the output compared with the one-hot value expected.
module tb_decoder_4_16;
  logic        pr;
  logic [3:0]  g;
  logic [15:0] d;
  int checks = 0, failures = 0;

  decoder_4_16 dut (.pr(pr), .g(g), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 16; a++) begin
        logic [15:0] exp;
        pr = e[0]; g = a[3:0];
        #1;
        exp = '0;
        if (e == 1) exp[a] = 1'b1;
        checks++;
        if (d !== exp) begin
          failures++;
          $display("FAIL pr=%0d g=%0d d=%h exp=%h", pr, g, d, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
