// Self-checking test of bs_fsm. The comparator is modelled in the testbench:
// band k is "too low" when its frequency index 28 + 2k is below the target
// n_target. For each target the FSM is restarted with hold low and must end
// in LOCK with the band an independent search gives: 0 if band 0 is already
// high enough, the top band if none reaches the target, otherwise the band
// just below the first one that reaches it. It checks S1/S2/S3 during the
// search and in LOCK, one done pulse per search, that the search takes at
// most 33 reference cycles, and that the band then stays frozen.
module tb_bs_fsm
  import wbpll_pkg::*;
;
  int checks = 0, failures = 0;
  logic ref_clk = 1, rst_n = 1, hold = 1;
  logic too_low, s1, s2, s3, done;
  logic [4:0] band;
  bs_state_t state;
  int n_target;
  int n_out_low = 0, n_out_high = 0, n_normal = 0;

  bs_fsm dut (.ref_clk(ref_clk), .rst_n(rst_n), .hold(hold), .too_low(too_low),
              .band(band), .s1(s1), .s2(s2), .s3(s3), .done(done), .state(state));

  assign too_low = (28 + 2 * int'(band)) < n_target;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #12500 ref_clk = ~ref_clk;

  function automatic int expected_band(input int n);
    if (28 >= n) return 0;
    for (int k = 1; k < 32; k++)
      if (28 + 2 * k >= n) return k - 1;
    return 31;
  endfunction

  task automatic search(input int n);
    int cycles = 0, dones = 0;
    n_target = n;
    @(posedge ref_clk);
    hold = 0;
    @(posedge ref_clk);
    hold = 1;
    check(state == BS_FIRST && band == 0 && s1 && !s2 && s3, "search start state");
    while (state != BS_LOCK && cycles < 40) begin
      @(posedge ref_clk);
      cycles++;
      if (done) dones++;
      if (state != BS_LOCK) check(s1 && !s2 && s3, "switches during search");
    end
    @(posedge ref_clk);
    if (done) dones++;
    check(cycles <= 33, $sformatf("search took %0d cycles", cycles));
    check(state == BS_LOCK && !s1 && s2 && !s3, "switches in lock");
    check(int'(band) == expected_band(n), $sformatf("target %0d: band %0d expected %0d", n, band, expected_band(n)));
    check(dones == 1, $sformatf("done pulses %0d", dones));
    if (expected_band(n) == 0 && 28 >= n) n_out_low++;
    else if (expected_band(n) == 31) n_out_high++;
    else n_normal++;
    repeat (5) @(posedge ref_clk);
    check(int'(band) == expected_band(n) && state == BS_LOCK, "band frozen");
  endtask

  initial begin
    n_target = 40;
    #100 rst_n = 0;
    #30000 rst_n = 1;   // held over a falling reference edge (synchronous reset)
    search(40);
    search(20);            // below the range
    search(28);            // exactly band 0
    search(29);
    search(200);           // above the range
    search(90);            // just at the top band
    for (int i = 0; i < 20; i++) search($urandom_range(100, 10));
    // hold dropping in the middle of a search restarts it
    n_target = 80;
    @(posedge ref_clk); hold = 0; @(posedge ref_clk); hold = 1;
    repeat (5) @(posedge ref_clk);
    check(band == 5, $sformatf("mid-search band %0d", band));
    @(posedge ref_clk); hold = 0; @(posedge ref_clk); hold = 1;
    check(band == 0 && state == BS_FIRST, "restart mid-search");
    check(n_out_low > 0 && n_out_high > 0 && n_normal > 0, "all three endings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
