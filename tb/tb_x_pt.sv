// tb_x_pt: exhaustive test of one crosspoint switch: with the grant high
// the three bits pass (address and data to the destination, the
// destination's data back to the source); with it low all outputs are 0.
module tb_x_pt;
  logic g_i_j, pa_i, pd_i, mdout_j, pdin_i, ma_j, md_j;
  int checks = 0, failures = 0;

  x_pt dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {g_i_j, pa_i, pd_i, mdout_j} = v[3:0];
      #1;
      checks++;
      if ({ma_j, md_j, pdin_i} !== (g_i_j ? {pa_i, pd_i, mdout_j} : 3'b000)) begin
        failures++;
        $display("FAIL v=%b -> ma=%b md=%b pdin=%b", v[3:0], ma_j, md_j, pdin_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
