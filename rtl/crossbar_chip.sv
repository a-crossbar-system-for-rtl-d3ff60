// crossbar_chip: one bit slice of a dynamic 16x16 crossbar between PEs.
//
// Every cycle each PE may raise its request pr_pad[i] and name a destination
// PE p_pad[i]. The decoder array turns these into one request vector per
// destination; one fair tree arbiter per destination picks a single source;
// the crosspoint matrix then connects each winner to its destination for
// the rest of the cycle: the source's address bit pa_pad[i] and data bit
// pd_pad[i] appear on the destination's ma_pad[j] and md_pad[j], and the
// destination's data bit mdot_pad[j] comes back on the source's pdin_pad[i].
// A source that requested but lost gets coll_pad[i] and retries later. The
// sixteen sources can all transfer in the same cycle if they name distinct
// destinations.
//
// Timing: the whole path from the pins through decoder, arbiter and switches
// to the outputs is combinational (the chip's latency, well inside one
// cycle); the only state is the arbiters' fairness flip-flops, which change
// on the falling edge of clk, the end of a cycle. A new switch setting is
// made every cycle; nothing is held between cycles. rst initialises all
// arbiters to the same state, so that the 33 chips of a word always choose
// the same winners. Destinations nobody is granted read 0.
//
// The structure (P_SYNC -> decoder array -> arbiter array -> crosspoint
// matrix -> outputs) follows the chip's top-level schematic. The collision
// output, active-high pins throughout and the omission of pads and pure
// buffer drivers are this design's choices.
module crossbar_chip
  import xbar_pkg::*;
(
  input  logic            clk,                 // CLOCK
  input  logic            rst,                 // RESET
  input  pe_addr_t        p_pad    [N_PE],     // P0..P15(3:0)
  input  logic [N_PE-1:0] pr_pad,              // PR(15:0)
  input  logic [N_PE-1:0] pa_pad,              // PA(15:0)
  input  logic [N_PE-1:0] pd_pad,              // PD(15:0)
  input  logic [N_PE-1:0] mdot_pad,            // MDOT(15:0)
  output logic [N_PE-1:0] pdin_pad,            // PDIN(15:0)
  output logic [N_PE-1:0] ma_pad,              // MA(15:0)
  output logic [N_PE-1:0] md_pad,              // MD(15:0)
  output logic [N_PE-1:0] coll_pad             // collision per source PE
);
  pe_addr_t        p  [N_PE];
  logic [N_PE-1:0] pr, pa, pd, pdin;
  logic [N_PE-1:0] r  [N_PE];   // r[dest][src]
  logic [N_PE-1:0] g  [N_PE];   // g[dest][src]

  p_sync u_p_sync (
    .p_pad    (p_pad),
    .pr_pad   (pr_pad),
    .pa_pad   (pa_pad),
    .pd_pad   (pd_pad),
    .pdin     (pdin),
    .g        (g),
    .p        (p),
    .pr       (pr),
    .pa       (pa),
    .pd       (pd),
    .pdin_pad (pdin_pad),
    .coll_pad (coll_pad)
  );

  decoder_array u_dec_arr (
    .pr (pr),
    .p  (p),
    .r  (r)
  );

  arbiter_array u_arb_arr (
    .clk (clk),
    .rst (rst),
    .r   (r),
    .g   (g)
  );

  x_pt_matrix u_matrix (
    .g     (g),
    .pa    (pa),
    .pd    (pd),
    .mdout (mdot_pad),
    .pdin  (pdin),
    .ma    (ma_pad),
    .md    (md_pad)
  );
endmodule
