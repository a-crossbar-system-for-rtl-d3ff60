// tb_x_pt_col: one crosspoint column. For random one-hot or empty grant
// vectors and random data, the destination must receive the granted
// source's address and data bits (0 with no grant), and only the granted
// source may see the destination's data bit on its PDIN contribution.
module tb_x_pt_col;
  import xbar_pkg::*;
  logic [N_PE-1:0] g_j, pa, pd, pdin;
  logic mdout_j, ma_j, md_j;
  int checks = 0, failures = 0;

  x_pt_col dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int s;
      s = $urandom % (N_PE + 1);          // N_PE means no grant
      g_j = (s == N_PE) ? '0 : (N_PE'(1) << s);
      pa = N_PE'($urandom); pd = N_PE'($urandom); mdout_j = 1'($urandom);
      #1;
      checks++;
      if (s == N_PE) begin
        if (ma_j !== 1'b0 || md_j !== 1'b0 || pdin !== '0) begin
          failures++; $display("FAIL idle column drives ma=%b md=%b pdin=%h", ma_j, md_j, pdin);
        end
      end else if (ma_j !== pa[s] || md_j !== pd[s] || pdin !== (N_PE'(mdout_j) << s)) begin
        failures++;
        $display("FAIL src %0d: ma=%b/%b md=%b/%b pdin=%h", s, ma_j, pa[s], md_j, pd[s], pdin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
