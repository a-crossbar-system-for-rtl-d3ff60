// tb_arbiter_1_16: the one-of-sixteen tree arbiter.
// 1. Single requests are granted at once, and two requests in the same
//    subtree alternate cycle by cycle (request patterns 0001..000A).
// 2. After reset and one cycle in which only requester 7 asks, a full load
//    (FFFF) must produce the grant order 8,0,12,4,10,2,14,6,9,1,13,5,11,3,
//    15,7,8: the rotation printed for this arbiter's simulation.
// 3. Random request patterns against an independent reference model.
// 4. Fairness: under full load each requester is served once in every 16
//    cycles (rate check).
module tb_arbiter_1_16;
  import xbar_ref_pkg::*;
  logic clk = 1'b1, rst = 1'b0;
  logic [15:0] preq = '0, pgrnt;
  int checks = 0, failures = 0;
  arb_state_t ref_s;

  arbiter_1_16 dut (.clk(clk), .rst(rst), .preq(preq), .pgrnt(pgrnt));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic do_reset();
    preq = '0;
    rst = 1'b1; #1; rst = 1'b0;
    arb_reset(ref_s);
    @(negedge clk); #1;
  endtask

  // One cycle with request r, expected grant e; the model is advanced too.
  task automatic cycle(logic [15:0] r, logic [15:0] e, string what);
    int w;
    preq = r; #2;
    check(what, pgrnt, e);
    w = arb_pick(ref_s, r, 1'b1);
    @(negedge clk); #1;
  endtask

  initial begin
    @(negedge clk); #1;
    do_reset();
    // 1. single requests and pairs
    cycle(16'h0001, 16'h0001, "single 0");
    cycle(16'h0002, 16'h0002, "single 1");
    cycle(16'h0004, 16'h0004, "single 2");
    cycle(16'h0008, 16'h0008, "single 3");
    cycle(16'h0009, 16'h0001, "pair 0/3 a");
    cycle(16'h0009, 16'h0008, "pair 0/3 b");
    cycle(16'h0009, 16'h0001, "pair 0/3 c");
    cycle(16'h0009, 16'h0008, "pair 0/3 d");
    cycle(16'h000A, 16'h0002, "pair 1/3 a");
    cycle(16'h000A, 16'h0008, "pair 1/3 b");
    cycle(16'h000A, 16'h0002, "pair 1/3 c");

    // 2. printed full-load rotation
    do_reset();
    cycle(16'h0080, 16'h0080, "prime 7");
    begin
      static int order [17] = '{8, 0, 12, 4, 10, 2, 14, 6, 9, 1, 13, 5, 11, 3, 15, 7, 8};
      foreach (order[k]) cycle(16'hFFFF, 16'(1) << order[k], "full load rotation");
    end

    // 3. random against the model
    do_reset();
    for (int t = 0; t < 3000; t++) begin
      logic [15:0] r;
      int w;
      r = 16'($urandom) & 16'($urandom);
      preq = r; #2;
      w = arb_pick(ref_s, r, 1'b1);
      check("random", pgrnt, (w < 0) ? 16'h0 : (16'(1) << w));
      @(negedge clk); #1;
    end

    // 4. rate: 16 cycles of full load serve 16 distinct requesters
    for (int rep = 0; rep < 4; rep++) begin
      logic [15:0] seen;
      seen = '0;
      for (int t = 0; t < 16; t++) begin
        preq = 16'hFFFF; #2;
        seen |= pgrnt;
        @(negedge clk); #1;
      end
      check("all served in 16 cycles", seen, 16'hFFFF);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
