// tb_arbiter_array: the sixteen per-destination arbiters together.
// Random request matrices (each source requesting at most one destination,
// as the decoders guarantee, plus fully random ones) are checked cycle by
// cycle against sixteen independent reference arbiters.
module tb_arbiter_array;
  import xbar_pkg::*;
  import xbar_ref_pkg::*;
  logic clk = 1'b1, rst = 1'b0;
  logic [N_PE-1:0] r [N_PE];
  logic [N_PE-1:0] g [N_PE];
  int checks = 0, failures = 0;
  arb_state_t ref_s [N_PE];

  arbiter_array dut (.clk(clk), .rst(rst), .r(r), .g(g));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N_PE; j++) begin
      r[j] = '0;
      arb_reset(ref_s[j]);
    end
    rst = 1'b1; #1; rst = 1'b0;
    @(negedge clk); #1;
    for (int t = 0; t < 1500; t++) begin
      for (int j = 0; j < N_PE; j++) r[j] = '0;
      if (t % 2 == 0) begin
        // decoder-like: every source asks for at most one destination,
        // destinations drawn from a small set to force contention
        for (int i = 0; i < N_PE; i++)
          if ($urandom % 4 != 0) begin
            int d;
            d = int'($urandom % 4) + 4 * int'(t % 4 == 0);
            r[d][i] = 1'b1;
          end
      end else begin
        for (int j = 0; j < N_PE; j++) r[j] = N_PE'($urandom);
      end
      #2;
      for (int j = 0; j < N_PE; j++) begin
        int w;
        logic [N_PE-1:0] exp;
        w = arb_pick(ref_s[j], r[j], 1'b1);
        exp = (w < 0) ? '0 : (N_PE'(1) << w);
        checks++;
        if (g[j] !== exp) begin
          failures++;
          if (failures < 20) $display("FAIL t=%0d dest %0d: r=%h g=%h expected %h", t, j, r[j], g[j], exp);
        end
      end
      @(negedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
