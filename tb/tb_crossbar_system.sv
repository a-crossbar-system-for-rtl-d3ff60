// tb_crossbar_system: end-to-end test of the crossbar system, reduced to
// four slices (three data bits plus the control bit) so that it builds
// quickly; tb_crossbar_system_full runs the same test with all 33 chips.
//
// Every cycle the test compares all outputs with a reference: sixteen model
// arbiters pick the winner per destination, the winner's whole PA and PD
// words must appear on the destination's MA and MD, the destination's MDOT
// word on the winner's PDIN, and a collision on every losing requester.
//
// Workloads:
//  * the two-transfer example: PE 0 sends data to PE 1 while PE 1 sends an
//    address to PE 2, in the same cycle;
//  * patterns of 1, 2, 4, 8 and 16 simultaneous requests, once to distinct
//    destinations (all must complete in one cycle) and once all to one
//    destination (PEs retry after a collision; n requests must complete in
//    exactly n cycles, one per cycle);
//  * random traffic with retries, with a reset in the middle.
// Mechanisms counted (each must occur): parallel transfer, collision,
// retry served after a collision, read return on PDIN, control bit carried,
// reset re-initialising all chips alike.
module tb_crossbar_system;
  import xbar_pkg::*;
  import xbar_ref_pkg::*;
  localparam int W = 4;   // slices: 3 data bits + control bit

  logic clk = 1'b1, rst = 1'b0;
  pe_addr_t        p_mod [N_PE];
  logic [N_PE-1:0] pr, coll;
  logic [W-1:0]    pa [N_PE], pd [N_PE], mdot [N_PE];
  logic [W-1:0]    pdin [N_PE], ma [N_PE], md [N_PE];

  int checks = 0, failures = 0;
  arb_state_t ref_s [N_PE];
  int n_parallel = 0, n_collision = 0, n_retry_served = 0, n_read_return = 0;
  int n_ctrl_bit = 0, n_reset = 0, n_full16 = 0;

  crossbar_system #(.N_SLICES(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int b = 0; b < W; b++) v[b] = 1'($urandom);
    return v;
  endfunction

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic do_reset();
    pr = '0;
    rst = 1'b1; #1; rst = 1'b0;
    for (int j = 0; j < N_PE; j++) arb_reset(ref_s[j]);
    n_reset++;
    @(negedge clk); #1;
  endtask

  // Applies the current pr/p_mod with fresh random words for one cycle,
  // checks every output and returns the set of served requesters.
  task automatic xfer(output logic [N_PE-1:0] served);
    logic [N_PE-1:0] req [N_PE];
    logic [N_PE-1:0] e_coll;
    int winners;
    for (int i = 0; i < N_PE; i++) begin
      pa[i] = rand_word(); pd[i] = rand_word(); mdot[i] = rand_word();
    end
    #2;
    for (int j = 0; j < N_PE; j++) req[j] = '0;
    for (int i = 0; i < N_PE; i++) if (pr[i]) req[p_mod[i]][i] = 1'b1;
    served = '0; e_coll = pr; winners = 0;
    for (int j = 0; j < N_PE; j++) begin
      int w;
      w = arb_pick(ref_s[j], req[j], 1'b1);
      if (w >= 0) begin
        chk($sformatf("ma[%0d]", j), ma[j], pa[w]);
        chk($sformatf("md[%0d]", j), md[j], pd[w]);
        chk($sformatf("pdin[%0d]", w), pdin[w], mdot[j]);
        served[w] = 1'b1; e_coll[w] = 1'b0; winners++;
        if (pdin[w] == mdot[j] && mdot[j] != '0) n_read_return++;
        if (pa[w][W-1] && ma[j][W-1]) n_ctrl_bit++;
      end else begin
        chk($sformatf("idle ma[%0d]", j), ma[j], '0);
        chk($sformatf("idle md[%0d]", j), md[j], '0);
      end
    end
    for (int i = 0; i < N_PE; i++)
      if (!served[i]) chk($sformatf("idle pdin[%0d]", i), pdin[i], '0);
    checks++;
    if (coll !== e_coll) begin
      failures++;
      if (failures < 20) $display("FAIL coll %h expected %h (t=%0t)", coll, e_coll, $time);
    end
    if (winners > 1) n_parallel++;
    if (winners == N_PE) n_full16++;
    if (e_coll != '0) n_collision++;
    @(negedge clk); #1;
  endtask

  // n PEs (random, distinct) send to n distinct destinations: one cycle.
  task automatic pattern_distinct(int n);
    int src [N_PE], dst [N_PE];
    logic [N_PE-1:0] served;
    for (int k = 0; k < N_PE; k++) begin src[k] = k; dst[k] = k; end
    src.shuffle(); dst.shuffle();
    pr = '0;
    for (int k = 0; k < n; k++) begin pr[src[k]] = 1'b1; p_mod[src[k]] = pe_addr_t'(dst[k]); end
    xfer(served);
    checks++;
    if (served != pr) begin
      failures++; $display("FAIL %0d distinct requests not all served in one cycle", n);
    end
    pr = '0;
  endtask

  // n PEs all send to one destination and retry after a collision.
  task automatic pattern_hotspot(int n);
    int src [N_PE];
    int dest, cycles;
    logic [N_PE-1:0] pending, served, lost;
    for (int k = 0; k < N_PE; k++) src[k] = k;
    src.shuffle();
    dest = int'($urandom % N_PE);
    pending = '0;
    for (int k = 0; k < n; k++) begin pending[src[k]] = 1'b1; p_mod[src[k]] = pe_addr_t'(dest); end
    cycles = 0; lost = '0;
    while (pending != '0 && cycles < 4 * N_PE) begin
      pr = pending;
      xfer(served);
      n_retry_served += $countones(served & lost);
      lost |= pending & ~served;
      pending &= ~served;
      cycles++;
      checks++;
      if ($countones(served) != 1) begin
        failures++; $display("FAIL hot spot: %0d served in one cycle", $countones(served));
      end
    end
    checks++;
    if (cycles != n) begin
      failures++; $display("FAIL hot spot of %0d took %0d cycles", n, cycles);
    end
    pr = '0;
  endtask

  initial begin
    logic [N_PE-1:0] served;
    for (int i = 0; i < N_PE; i++) begin
      p_mod[i] = '0; pa[i] = '0; pd[i] = '0; mdot[i] = '0;
    end
    pr = '0;
    do_reset();

    // Two-transfer example: PE 0 -> PE 1 data, PE 1 -> PE 2 address.
    pr = 16'h0003; p_mod[0] = 4'd1; p_mod[1] = 4'd2;
    xfer(served);
    chk("example served", W'(served), W'(16'h0003));
    pr = '0;

    // 1, 2, 4, 8, 16 simultaneous requests.
    for (int rep = 0; rep < 20; rep++)
      for (int n = 1; n <= N_PE; n *= 2) begin
        pattern_distinct(n);
        pattern_hotspot(n);
      end

    // Random traffic with retries; reset in the middle.
    begin
      logic [N_PE-1:0] pending, lost;
      pending = '0; lost = '0;
      for (int t = 0; t < 600; t++) begin
        if (t == 300) begin do_reset(); pending = '0; lost = '0; end
        for (int i = 0; i < N_PE; i++)
          if (!pending[i] && ($urandom % 2 != 0)) begin
            pending[i] = 1'b1;
            p_mod[i] = pe_addr_t'($urandom % 6);
          end
        pr = pending;
        xfer(served);
        n_retry_served += $countones(served & lost);
        lost = (lost | (pending & ~served)) & ~served;
        pending &= ~served;
      end
    end
    pr = '0;

    $display("mechanisms: parallel=%0d all16=%0d collision=%0d retry_served=%0d read_return=%0d ctrl_bit=%0d reset=%0d",
             n_parallel, n_full16, n_collision, n_retry_served, n_read_return, n_ctrl_bit, n_reset);
    checks++; if (n_parallel == 0)     begin failures++; $display("FAIL no parallel transfer"); end
    checks++; if (n_full16 == 0)       begin failures++; $display("FAIL no 16-way transfer"); end
    checks++; if (n_collision == 0)    begin failures++; $display("FAIL no collision"); end
    checks++; if (n_retry_served == 0) begin failures++; $display("FAIL no retry served"); end
    checks++; if (n_read_return == 0)  begin failures++; $display("FAIL no read return"); end
    checks++; if (n_ctrl_bit == 0)     begin failures++; $display("FAIL control bit never carried"); end
    checks++; if (n_reset < 2)         begin failures++; $display("FAIL no reset during traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
