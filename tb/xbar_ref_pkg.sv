// xbar_ref_pkg: reference model of the crossbar's arbitration, for testbenches.
//
// Each destination's arbiter is modelled as a binary tree whose node n
// (heap order, root 1) remembers which half it served last (0 lower, 1
// upper). A grant descends from the root: at each node, if only one half
// holds a request that half is taken, if both do the half not served last is
// taken. After the cycle every node on the path records the half it took.
// All nodes start at 1 after reset.
package xbar_ref_pkg;
  localparam int NPE = 16;

  typedef struct {
    bit last [NPE];    // last[n]: half served last by node n (1..NPE-1)
  } arb_state_t;

  function automatic void arb_reset(ref arb_state_t s);
    for (int n = 0; n < NPE; n++) s.last[n] = 1'b1;
  endfunction

  // Returns the granted requester (-1 if none) and, when commit is set,
  // updates the node memories along the path.
  function automatic int arb_pick(ref arb_state_t s, input logic [NPE-1:0] req, input bit commit);
    int node, lo, size, half;
    bit lower, upper, side;
    if (req == '0) return -1;
    node = 1; lo = 0; size = NPE;
    while (size > 1) begin
      half  = size / 2;
      lower = 1'b0; upper = 1'b0;
      for (int k = 0; k < half; k++) begin
        lower |= req[lo + k];
        upper |= req[lo + half + k];
      end
      if (lower && upper) side = ~s.last[node];
      else                side = upper;
      if (commit) s.last[node] = side;
      lo   = side ? lo + half : lo;
      node = 2 * node + int'(side);
      size = half;
    end
    return lo;
  endfunction
endpackage
