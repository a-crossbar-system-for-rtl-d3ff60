// x_pt: one crosspoint switch between source PE i and destination PE j.
//
// While g_i_j is high, source i's address bit and data bit are passed to
// destination j (ma_j, md_j) and destination j's data bit is passed back to
// source i (pdin_i). While it is low all three contributions are 0. The chip
// uses tristate drivers on shared column and row wires; here each switch
// yields an AND-gated contribution that the column and matrix OR together,
// which is the same function when at most one switch drives a wire, and the
// wire reads 0 instead of floating when none does. The chip's active-low
// column buses and inverting output pads cancel, so all signals here are
// active high. Combinational, unbuffered: a connection lasts one cycle.
module x_pt (
  input  logic g_i_j,    // grant: source i connected to destination j
  input  logic pa_i,     // source i address bit
  input  logic pd_i,     // source i data bit
  input  logic mdout_j,  // destination j data bit (returned to source)
  output logic pdin_i,   // contribution to source i's PDIN wire
  output logic ma_j,     // contribution to destination j's MA wire
  output logic md_j      // contribution to destination j's MD wire
);
  assign ma_j   = g_i_j & pa_i;
  assign md_j   = g_i_j & pd_i;
  assign pdin_i = g_i_j & mdout_j;
endmodule
