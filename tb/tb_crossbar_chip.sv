// tb_crossbar_chip: one bit-slice chip under random traffic.
// Each cycle every PE requests with some probability and names a
// destination drawn from a small hot set, so that contention is frequent.
// Sixteen reference arbiters predict the winners; the test checks, within
// the same cycle, MA/MD of every destination, PDIN of every source and the
// collision outputs. It also checks that a reset mid-run restores the
// arbiters' initial state.
module tb_crossbar_chip;
  import xbar_pkg::*;
  import xbar_ref_pkg::*;
  logic clk = 1'b1, rst = 1'b0;
  pe_addr_t        p_pad [N_PE];
  logic [N_PE-1:0] pr_pad, pa_pad, pd_pad, mdot_pad, pdin_pad, ma_pad, md_pad, coll_pad;
  int checks = 0, failures = 0;
  arb_state_t ref_s [N_PE];

  crossbar_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    pr_pad = '0;
    rst = 1'b1; #1; rst = 1'b0;
    for (int j = 0; j < N_PE; j++) arb_reset(ref_s[j]);
    @(negedge clk); #1;
  endtask

  task automatic chk(string what, logic [N_PE-1:0] got, logic [N_PE-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < N_PE; i++) p_pad[i] = '0;
    pa_pad = '0; pd_pad = '0; mdot_pad = '0;
    do_reset();
    for (int t = 0; t < 2000; t++) begin
      logic [N_PE-1:0] req [N_PE];
      logic [N_PE-1:0] e_ma, e_md, e_pdin, e_coll;
      if (t == 1000) do_reset();
      for (int i = 0; i < N_PE; i++) begin
        p_pad[i] = (t % 3 == 0) ? pe_addr_t'($urandom) : pe_addr_t'($urandom % 3);
      end
      pr_pad = N_PE'($urandom) | N_PE'($urandom);
      pa_pad = N_PE'($urandom); pd_pad = N_PE'($urandom); mdot_pad = N_PE'($urandom);
      #2;
      for (int j = 0; j < N_PE; j++) req[j] = '0;
      for (int i = 0; i < N_PE; i++) if (pr_pad[i]) req[p_pad[i]][i] = 1'b1;
      e_ma = '0; e_md = '0; e_pdin = '0; e_coll = pr_pad;
      for (int j = 0; j < N_PE; j++) begin
        int w;
        w = arb_pick(ref_s[j], req[j], 1'b1);
        if (w >= 0) begin
          e_ma[j] = pa_pad[w];
          e_md[j] = pd_pad[w];
          e_pdin[w] = mdot_pad[j];
          e_coll[w] = 1'b0;
        end
      end
      chk("ma", ma_pad, e_ma);
      chk("md", md_pad, e_md);
      chk("pdin", pdin_pad, e_pdin);
      chk("coll", coll_pad, e_coll);
      @(negedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
