// decoder_4_16: one PE's destination decoder.
//
// When the PE request pr is high, exactly one output d[k] goes high, k being
// the destination PE number g (G3..G0); with pr low all outputs are low.
// Each output is formed in two gate levels, as the chip does it for speed:
// a 3-input NAND of pr and two address literals and a 2-input NAND of the
// other two literals, joined by a 2-input NOR. Which literals share a NAND
// is this design's choice. Purely combinational, no clock.
module decoder_4_16 (
  input  logic        pr,   // PR: request enable
  input  logic [3:0]  g,    // G3..G0: destination PE number
  output logic [15:0] d     // D(15:0): one-hot destination
);
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      logic lit0, lit1, lit2, lit3;
      logic nand3, nand2;
      lit0  = k[0] ? g[0] : ~g[0];
      lit1  = k[1] ? g[1] : ~g[1];
      lit2  = k[2] ? g[2] : ~g[2];
      lit3  = k[3] ? g[3] : ~g[3];
      nand3 = ~(pr & lit0 & lit1);
      nand2 = ~(lit2 & lit3);
      d[k]  = ~(nand3 | nand2);
    end
  end
endmodule
