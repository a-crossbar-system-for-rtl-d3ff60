// darb_1_2: one-of-two fair arbiter cell, the building block of the arbiter tree.
//
// reqc tells the parent that either input requests. When the parent grants
// (grantc high) a lone request is granted; if both inputs request, the one
// that was not served last wins. A flip-flop holds the number of the input
// served last (state 0: req0, state 1: req1) and is updated only when this
// cell actually grants; with grantc low it holds. This follows the cell's
// state table:
//   state 0, both -> grant1, next 1      state 1, both -> grant0, next 0
//   lone reqN     -> grantN, next N      grantc low / no request -> hold
// Grants are combinational in the inputs and the state. The state changes on
// the falling edge of clk, which ends the crossbar's cycle. rst (active high,
// asynchronous) puts the state to RESET_STATE; the default 1 mirrors the cell
// being initialised through its set input. Ungated grants (no clock gating)
// are this design's choice.
module darb_1_2 #(
  parameter logic RESET_STATE = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic req0,
  input  logic req1,
  input  logic grantc,
  output logic grant0,
  output logic grant1,
  output logic reqc
);
  logic state;   // number of the input granted last

  assign reqc = req0 | req1;

  always_comb begin
    grant0 = 1'b0;
    grant1 = 1'b0;
    if (grantc) begin
      if (req0 && req1) begin
        grant0 = state;
        grant1 = ~state;
      end else begin
        grant0 = req0;
        grant1 = req1;
      end
    end
  end

  always_ff @(negedge clk or posedge rst)
    if (rst)          state <= RESET_STATE;
    else if (grant0)  state <= 1'b0;
    else if (grant1)  state <= 1'b1;

  // The grant rules (at most one grant, only to a requester) are asserted
  // once per tree in arbiter_1_16.
endmodule
