// arbiter_array: one fair arbiter per destination PE.
//
// Arbiter j receives r[j], the vector of sources requesting destination j,
// and drives g[j], the one-hot (or empty) grant for that destination. g[j][i]
// high means source i and destination j are connected in this cycle. All
// arbiters share clk and rst; their state changes on the falling edge.
module arbiter_array
  import xbar_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [N_PE-1:0] r [N_PE],   // R0..R15(15:0): r[dest][src]
  output logic [N_PE-1:0] g [N_PE]    // GJ0..GJ15(15:0): g[dest][src]
);
  for (genvar j = 0; j < N_PE; j++) begin : g_arb
    arbiter_1_16 #(.N(N_PE)) u_arb (
      .clk   (clk),
      .rst   (rst),
      .preq  (r[j]),
      .pgrnt (g[j])
    );
  end
endmodule
