// x_pt_col: the sixteen crosspoints that serve one destination PE j.
//
// Switch i connects source i to destination j when g_j[i] is high. The
// switches' MA and MD contributions are ORed onto the column's single MA and
// MD wire (the chip's wired-or), so destination j sees the bits of the one
// granted source, or 0. pdin[i] is switch i's contribution to source i's
// PDIN wire, carrying destination j's MDOUT bit back. Combinational.
module x_pt_col
  import xbar_pkg::*;
(
  input  logic [N_PE-1:0] g_j,      // G_J(15:0): grant of each source to j
  input  logic [N_PE-1:0] pa,       // PA(15:0)
  input  logic [N_PE-1:0] pd,       // PD(15:0)
  input  logic            mdout_j,  // MDOUT_J
  output logic [N_PE-1:0] pdin,     // PDIN(15:0) contributions of this column
  output logic            ma_j,     // MA_J
  output logic            md_j      // MD_J
);
  logic [N_PE-1:0] ma_c, md_c;

  for (genvar i = 0; i < N_PE; i++) begin : g_pt
    x_pt u_pt (
      .g_i_j   (g_j[i]),
      .pa_i    (pa[i]),
      .pd_i    (pd[i]),
      .mdout_j (mdout_j),
      .pdin_i  (pdin[i]),
      .ma_j    (ma_c[i]),
      .md_j    (md_c[i])
    );
  end

  assign ma_j = |ma_c;
  assign md_j = |md_c;
endmodule
