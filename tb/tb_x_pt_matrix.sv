// tb_x_pt_matrix: the full 16x16 crosspoint matrix. Random partial
// permutations (each source granted in at most one column, each column
// granting at most one source) are applied with random bits; every
// destination must receive its source's PA and PD bit, every connected
// source its destination's MDOUT bit, and everything unconnected 0.
module tb_x_pt_matrix;
  import xbar_pkg::*;
  logic [N_PE-1:0] g [N_PE];
  logic [N_PE-1:0] pa, pd, mdout, pdin, ma, md;
  int checks = 0, failures = 0;

  x_pt_matrix dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int src_of [N_PE];   // source connected to each destination, -1 none
      int dst_of [N_PE];   // destination connected to each source, -1 none
      int perm [N_PE];
      for (int k = 0; k < N_PE; k++) begin perm[k] = k; dst_of[k] = -1; end
      perm.shuffle();
      for (int j = 0; j < N_PE; j++) begin
        src_of[j] = ($urandom % 3 == 0) ? -1 : perm[j];
        g[j] = '0;
        if (src_of[j] >= 0) begin
          g[j][src_of[j]] = 1'b1;
          dst_of[src_of[j]] = j;
        end
      end
      pa = N_PE'($urandom); pd = N_PE'($urandom); mdout = N_PE'($urandom);
      #1;
      for (int j = 0; j < N_PE; j++) begin
        logic ea, ed;
        ea = (src_of[j] < 0) ? 1'b0 : pa[src_of[j]];
        ed = (src_of[j] < 0) ? 1'b0 : pd[src_of[j]];
        checks++;
        if (ma[j] !== ea || md[j] !== ed) begin
          failures++;
          if (failures < 20) $display("FAIL dest %0d: ma=%b/%b md=%b/%b", j, ma[j], ea, md[j], ed);
        end
      end
      for (int i = 0; i < N_PE; i++) begin
        logic ep;
        ep = (dst_of[i] < 0) ? 1'b0 : mdout[dst_of[i]];
        checks++;
        if (pdin[i] !== ep) begin
          failures++;
          if (failures < 20) $display("FAIL src %0d: pdin=%b expected %b", i, pdin[i], ep);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
