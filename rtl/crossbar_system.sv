// crossbar_system: a 16-PE crossbar that moves a whole word per cycle.
//
// N_SLICES bit-slice crossbar chips are stacked: chip k carries bit k of
// every PE's address (pa), outgoing data (pd), returned data (mdot -> pdin),
// and of the address and data delivered to the destination (ma, md). With
// the default 33 chips, chips 0..31 carry a 32-bit word and chip 32 carries
// one control bit per bus (the PEs use it as a strobe for their bus
// protocol). Every chip receives the same destination numbers p_mod, the same
// requests pr, the same clock and the same reset, so every chip's arbiters
// make the same decision and the word is switched as a whole. Each PE's
// collision pin comes from the control chip (the last slice).
//
// Timing: combinational from the PE inputs to the outputs within one cycle,
// as in crossbar_chip; arbitration state changes on the falling edge of clk.
// A source PE i that names destination j and is granted sees, in the same
// cycle, ma[j] = pa[i], md[j] = pd[i] and pdin[i] = mdot[j]; one that loses
// sees coll[i] = 1.
//
// The split of each PE control signal into two driver copies on the board,
// and the board's 74F244 drivers, are single wires here.
module crossbar_system
  import xbar_pkg::*;
#(
  parameter int unsigned N_SLICES = WORD_W + CTRL_W
) (
  input  logic                clk,
  input  logic                rst,
  input  pe_addr_t            p_mod [N_PE],   // P0..P15(3:0): destination PE number
  input  logic [N_PE-1:0]     pr,             // PR(15:0): request
  input  logic [N_SLICES-1:0] pa    [N_PE],   // address word + control bit from PE i
  input  logic [N_SLICES-1:0] pd    [N_PE],   // data word + control bit from PE i
  input  logic [N_SLICES-1:0] mdot  [N_PE],   // data returned by destination PE i
  output logic [N_SLICES-1:0] pdin  [N_PE],   // data into source PE i
  output logic [N_SLICES-1:0] ma    [N_PE],   // address into destination PE i
  output logic [N_SLICES-1:0] md    [N_PE],   // data into destination PE i
  output logic [N_PE-1:0]     coll            // collision pin of each PE
);
  // Bit-sliced views: *_s[k][i] is bit k of PE i's bus.
  logic [N_PE-1:0] pa_s   [N_SLICES];
  logic [N_PE-1:0] pd_s   [N_SLICES];
  logic [N_PE-1:0] mdot_s [N_SLICES];
  logic [N_PE-1:0] pdin_s [N_SLICES];
  logic [N_PE-1:0] ma_s   [N_SLICES];
  logic [N_PE-1:0] md_s   [N_SLICES];
  logic [N_PE-1:0] coll_s [N_SLICES];

  for (genvar k = 0; k < N_SLICES; k++) begin : g_bit
    for (genvar i = 0; i < N_PE; i++) begin : g_pe
      assign pa_s[k][i]   = pa[i][k];
      assign pd_s[k][i]   = pd[i][k];
      assign mdot_s[k][i] = mdot[i][k];
      assign pdin[i][k]   = pdin_s[k][i];
      assign ma[i][k]     = ma_s[k][i];
      assign md[i][k]     = md_s[k][i];
    end
  end

  for (genvar k = 0; k < N_SLICES; k++) begin : g_chip
    crossbar_chip u_chip (
      .clk      (clk),
      .rst      (rst),
      .p_pad    (p_mod),
      .pr_pad   (pr),
      .pa_pad   (pa_s[k]),
      .pd_pad   (pd_s[k]),
      .mdot_pad (mdot_s[k]),
      .pdin_pad (pdin_s[k]),
      .ma_pad   (ma_s[k]),
      .md_pad   (md_s[k]),
      .coll_pad (coll_s[k])
    );
  end

  assign coll = coll_s[N_SLICES-1];

  // Word consistency: all slices must agree on who lost arbitration.
  logic slices_agree;
  always_comb begin
    slices_agree = 1'b1;
    for (int k = 0; k < N_SLICES; k++)
      if (coll_s[k] != coll_s[N_SLICES-1]) slices_agree = 1'b0;
  end
  a_word_consistent: assert property (@(negedge clk) disable iff (rst) slices_agree);
endmodule
