// tb_decoder_array: random test of the decoder array.
// For random requests and destination numbers it checks that r[j][i] is
// high exactly when PE i requests and names destination j.
module tb_decoder_array;
  import xbar_pkg::*;
  logic [N_PE-1:0] pr;
  pe_addr_t        p [N_PE];
  logic [N_PE-1:0] r [N_PE];
  int checks = 0, failures = 0;

  decoder_array dut (.pr(pr), .p(p), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      pr = N_PE'($urandom);
      for (int i = 0; i < N_PE; i++) p[i] = pe_addr_t'($urandom);
      #1;
      for (int j = 0; j < N_PE; j++)
        for (int i = 0; i < N_PE; i++) begin
          logic exp;
          exp = pr[i] && (int'(p[i]) == j);
          checks++;
          if (r[j][i] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d r[%0d][%0d]=%0b exp %0b", t, j, i, r[j][i], exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
