// tb_p_sync: the PE-side interface. Random pad inputs must reach the core
// unchanged, PDIN must reach its pad, and the conflict output must be high
// exactly for the PEs that requested and hold no grant in any column.
module tb_p_sync;
  import xbar_pkg::*;
  pe_addr_t        p_pad [N_PE], p [N_PE];
  logic [N_PE-1:0] pr_pad, pa_pad, pd_pad, pdin, pr, pa, pd, pdin_pad, coll_pad;
  logic [N_PE-1:0] g [N_PE];
  int checks = 0, failures = 0;

  p_sync dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [N_PE-1:0] exp_coll;
      for (int i = 0; i < N_PE; i++) p_pad[i] = pe_addr_t'($urandom);
      pr_pad = N_PE'($urandom); pa_pad = N_PE'($urandom);
      pd_pad = N_PE'($urandom); pdin = N_PE'($urandom);
      for (int j = 0; j < N_PE; j++) g[j] = '0;
      exp_coll = pr_pad;
      // grant a random subset of the requesters, each in a random column
      for (int i = 0; i < N_PE; i++)
        if (pr_pad[i] && $urandom % 2) begin
          int col;
          col = int'($urandom % N_PE);
          g[col][i] = 1'b1;
          exp_coll[i] = 1'b0;
        end
      #1;
      checks++;
      if (coll_pad !== exp_coll) begin
        failures++;
        if (failures < 20) $display("FAIL coll=%h expected %h (pr=%h)", coll_pad, exp_coll, pr_pad);
      end
      checks++;
      if (pr !== pr_pad || pa !== pa_pad || pd !== pd_pad || pdin_pad !== pdin) begin
        failures++;
        $display("FAIL pass-through signals differ");
      end
      for (int i = 0; i < N_PE; i++) begin
        checks++;
        if (p[i] !== p_pad[i]) begin failures++; $display("FAIL p[%0d]", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
