// p_sync: the PE-side interface of one crossbar chip.
//
// It carries the signals arriving from the PEs' pins (destination numbers P,
// requests PR, the address bit PA and the data bit PD) to the decoders and
// the crosspoint matrix, and carries each source's returned bit PDIN out. In
// the chip these are buffers and inverters that only add drive; here they
// are plain connections. Its one piece of logic is the conflict signal sent
// back to each PE: coll_pad[i] is high when PE i requested (pr_pad[i]) but
// no arbiter granted it, so the PE must try again in a later cycle. The
// conflict rule is this design's reading of the chip's "conflict
// information"; the pin itself is not on the chip's printed pin-out.
// Combinational; the conflict is valid in the same cycle as the request.
module p_sync
  import xbar_pkg::*;
(
  input  pe_addr_t        p_pad  [N_PE],  // P0PD..P15PD(3:0)
  input  logic [N_PE-1:0] pr_pad,         // PRPD(15:0)
  input  logic [N_PE-1:0] pa_pad,         // PAPD(15:0)
  input  logic [N_PE-1:0] pd_pad,         // PDPD(15:0)
  input  logic [N_PE-1:0] pdin,           // PDIN(15:0) from the matrix
  input  logic [N_PE-1:0] g      [N_PE],  // grants, g[dest][src]
  output pe_addr_t        p      [N_PE],  // P0..P15(3:0)
  output logic [N_PE-1:0] pr,             // PR(15:0)
  output logic [N_PE-1:0] pa,             // PA(15:0)
  output logic [N_PE-1:0] pd,             // PD(15:0)
  output logic [N_PE-1:0] pdin_pad,       // PDIP(15:0)
  output logic [N_PE-1:0] coll_pad        // conflict to each PE
);
  logic [N_PE-1:0] granted;   // source i holds a grant in some column

  always_comb begin
    granted = '0;
    for (int j = 0; j < N_PE; j++) granted |= g[j];
  end

  assign p        = p_pad;
  assign pr       = pr_pad;
  assign pa       = pa_pad;
  assign pd       = pd_pad;
  assign pdin_pad = pdin;
  assign coll_pad = pr_pad & ~granted;
endmodule
