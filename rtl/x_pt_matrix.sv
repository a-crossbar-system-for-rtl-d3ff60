// x_pt_matrix: the 16x16 crosspoint matrix of one bit slice (256 switches).
//
// Column j (an x_pt_col) connects destination j to the source its arbiter
// granted. ma[j]/md[j] are the address and data bits delivered to
// destination j; pdin[i] is the bit returned to source i from the
// destination it is connected to, the OR over all columns (a source is
// granted in at most one column because it requests only one destination).
// Combinational; the switch setting can change every cycle.
module x_pt_matrix
  import xbar_pkg::*;
(
  input  logic [N_PE-1:0] g [N_PE],  // GJ0..GJ15(15:0): g[dest][src]
  input  logic [N_PE-1:0] pa,        // PA(15:0)
  input  logic [N_PE-1:0] pd,        // PD(15:0)
  input  logic [N_PE-1:0] mdout,     // MDOJ(15:0)
  output logic [N_PE-1:0] pdin,      // PDIN(15:0)
  output logic [N_PE-1:0] ma,        // MAJB(15:0), active high here
  output logic [N_PE-1:0] md         // MDJB(15:0), active high here
);
  logic [N_PE-1:0] pdin_c [N_PE];    // pdin_c[dest][src]

  for (genvar j = 0; j < N_PE; j++) begin : g_col
    x_pt_col u_col (
      .g_j     (g[j]),
      .pa      (pa),
      .pd      (pd),
      .mdout_j (mdout[j]),
      .pdin    (pdin_c[j]),
      .ma_j    (ma[j]),
      .md_j    (md[j])
    );
  end

  always_comb begin
    pdin = '0;
    for (int j = 0; j < N_PE; j++) pdin |= pdin_c[j];
  end
endmodule
