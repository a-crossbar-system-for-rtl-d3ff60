// decoder_array: the sixteen destination decoders of the crossbar chip.
//
// Decoder i takes PE i's request pr[i] and destination number p[i] and drives
// row i of the request matrix. The outputs are grouped by destination, the
// way the arbiters need them: r[j][i] is high when PE i requests PE j, so
// r[j] is the request vector for the arbiter of destination j. At most one
// r[*][i] is high per source. Combinational.
module decoder_array
  import xbar_pkg::*;
(
  input  logic     [N_PE-1:0] pr,          // PR(15:0)
  input  pe_addr_t            p [N_PE],    // P0..P15(3:0)
  output logic     [N_PE-1:0] r [N_PE]     // R0..R15(15:0): r[dest][src]
);
  logic [N_PE-1:0] d [N_PE];   // d[src][dest], decoder outputs

  for (genvar i = 0; i < N_PE; i++) begin : g_dec
    decoder_4_16 u_dec (.pr(pr[i]), .g(p[i]), .d(d[i]));
  end

  always_comb
    for (int j = 0; j < N_PE; j++)
      for (int i = 0; i < N_PE; i++)
        r[j][i] = d[i][j];
endmodule
