// tb_darb_1_2: the one-of-two arbiter cell against its state table and its
// published simulation trace.
// Part 1 applies every row of the state table from both states and checks
// grants, reqc and the next state (probed by a following two-request cycle).
// Part 2 replays the request sequence of the cell's simulation trace, after
// initialisation to state 1, and checks the printed grant sequence.
// The state changes on the falling clock edge; inputs are applied just after
// it and outputs sampled before the next one.
module tb_darb_1_2;
  logic clk = 1'b1, rst = 1'b0;
  logic req0 = 0, req1 = 0, grantc = 0;
  logic grant0, grant1, reqc;
  int checks = 0, failures = 0;

  darb_1_2 dut (.*);

  always #5 clk = ~clk;   // falling edges at 5, 15, 25, ...

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (t=%0t) req=%0b%0b gc=%0b", what, got, exp, $time, req1, req0, grantc);
    end
  endtask

  // Apply inputs for one cycle, check the outputs, let the falling edge pass.
  task automatic step(logic r0, logic r1, logic gc, logic e0, logic e1, logic erc, bit chk_rc);
    req0 = r0; req1 = r1; grantc = gc;
    #2;
    check("grant0", grant0, e0);
    check("grant1", grant1, e1);
    if (chk_rc) check("reqc", reqc, erc);
    @(negedge clk); #1;
  endtask

  // Bring the cell to state s: reset gives 1, a lone req0 grant then gives 0.
  task automatic set_state(logic s);
    req0 = 1'b0; req1 = 1'b0; grantc = 1'b0;
    rst = 1'b1; #1; rst = 1'b0;
    @(negedge clk); #1;
    if (s == 1'b0) step(1, 0, 1, 1, 0, 1, 1);
  endtask

  // Probe the state: with both requests, state 0 grants req1, state 1 req0.
  task automatic expect_state(logic s);
    step(1, 1, 1, s, ~s, 1, 1);
  endtask

  typedef struct { logic ps, r0, r1, gc, ns, g0, g1, rc; bit rc_known; } row_t;
  row_t rows [$];

  initial begin
    @(negedge clk); #1;
    // State table rows (present state, inputs -> next state, outputs).
    rows = '{
      '{0,0,0,0, 0,0,0,0,1}, '{0,1,0,1, 0,1,0,1,1}, '{0,1,1,1, 1,0,1,1,1},
      '{0,0,0,1, 0,0,0,0,1}, '{0,0,1,1, 1,0,1,1,1},
      '{1,0,0,0, 1,0,0,0,1}, '{1,0,1,1, 1,0,1,1,1}, '{1,1,1,1, 0,1,0,1,1},
      '{1,0,0,1, 1,0,0,0,1}, '{1,1,0,1, 0,1,0,1,1}};
    // "don't care" request rows with GRANTC low: no grant, state holds.
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < 4; a++)
        rows.push_back('{s[0], a[0], a[1], 1'b0, s[0], 1'b0, 1'b0, 1'b0, 1'b0});
    foreach (rows[k]) begin
      set_state(rows[k].ps);
      step(rows[k].r0, rows[k].r1, rows[k].gc, rows[k].g0, rows[k].g1, rows[k].rc, rows[k].rc_known);
      expect_state(rows[k].ns);
    end

    // reqc follows the requests even with grantc low.
    step(1, 0, 0, 0, 0, 1, 1);
    step(0, 1, 0, 0, 0, 1, 1);

    // Simulation trace: initialise to 1 (set), both requesting -> grant0.
    rst = 1'b1; req0 = 1; req1 = 1; grantc = 1; #2;
    check("grant0 during set", grant0, 1'b1);
    check("grant1 during set", grant1, 1'b0);
    @(negedge clk); #1; rst = 1'b0;
    begin
      static logic [1:0] req_seq [14] = '{2'b01, 2'b11, 2'b11, 2'b11, 2'b01, 2'b10, 2'b11,
                                   2'b10, 2'b11, 2'b11, 2'b01, 2'b11, 2'b11, 2'b11};
      static logic [1:0] gnt_seq [14] = '{2'b01, 2'b10, 2'b01, 2'b10, 2'b01, 2'b10, 2'b01,
                                   2'b10, 2'b01, 2'b10, 2'b01, 2'b10, 2'b01, 2'b10};
      for (int k = 0; k < 14; k++)
        step(req_seq[k][0], req_seq[k][1], 1'b1, gnt_seq[k][0], gnt_seq[k][1], 1'b1, 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
