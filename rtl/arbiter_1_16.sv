// arbiter_1_16: fair one-of-N arbiter for one destination PE (N = 16).
//
// A binary tree of N-1 darb_1_2 cells. The N requests enter at the leaves,
// in pairs (0,1), (2,3), ...; every cell passes "some request below me" up
// on reqc, and the root, whose grantc is tied high, sends one grant back
// down. Each cell alternates between its two halves when both request, so
// under full load the grants sweep all N requesters before any is served
// twice. With all requests held high the grant order from a given state is a
// bit-reversed rotation, e.g. 8,0,12,4,10,2,14,6,9,1,13,5,11,3,15,7.
//
// Grants are combinational in preq and the cells' state; the state changes
// on the falling edge of clk. rst sets every cell to state 1 (asynchronous).
// The cell numbering is heap order: node 1 is the root, node n has children
// 2n and 2n+1, and nodes N..2N-1 stand for the requesters. N must be a power
// of two.
module arbiter_1_16 #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] preq,    // Preq(15:0)
  output logic [N-1:0] pgrnt    // Pgrnt(15:0), at most one bit high
);
  logic [2*N-1:1] req_up;    // request summary leaving each node
  logic [2*N-1:1] grant_dn;  // grant entering each node

  assign grant_dn[1] = 1'b1;

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign req_up[N+i] = preq[i];
    assign pgrnt[i]    = grant_dn[N+i];
  end

  for (genvar n = 1; n < N; n++) begin : g_node
    darb_1_2 u_cell (
      .clk    (clk),
      .rst    (rst),
      .req0   (req_up[2*n]),
      .req1   (req_up[2*n+1]),
      .grantc (grant_dn[n]),
      .grant0 (grant_dn[2*n]),
      .grant1 (grant_dn[2*n+1]),
      .reqc   (req_up[n])
    );
  end

  a_onehot: assert property (@(negedge clk) disable iff (rst) $onehot0(pgrnt));
  a_served: assert property (@(negedge clk) disable iff (rst) (preq != '0) == (pgrnt != '0));
endmodule
