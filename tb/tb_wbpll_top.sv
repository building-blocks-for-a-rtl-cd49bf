// End-to-end test of wbpll_top at its default (full) size, with the VCO
// model and a 40 MHz reference. Each operation: a new N_desired is applied,
// the band search runs with the VCO tuning node on V_min, the search ends,
// the normal loop closes (the analog loop is taken as settled, so the VCO
// model runs at N_desired * 40 MHz), and the fractional-N divider runs for
// a number of reference periods. Checks:
//  - the search ends within 33 reference cycles, with the band consistent
//    with the band frequencies (see tb_band_search for the bound),
//    band 0 below the VCO range and band 31 above it;
//  - switches: S1 = S3 = 1, S2 = 0 while searching, the reverse after;
//  - every divider period equals 2*(A + 4*B) for its A, B;
//  - the mean divider period equals N_desired in VCO periods, and the mean
//    output frequency is 40 MHz within 0.5 %.
// It counts how often each mechanism happened: band step up, search ended by
// stepping back, ended below range, ended on the top band, restart on a new
// modulus, prescaler cycles at 1.25 and at 1, negative and positive
// modulator offsets; each must happen at least once.
module tb_wbpll_top;
  int checks = 0, failures = 0;
  logic ref_clk = 1, rst_n = 1, vco;
  logic [25:0] n_desired;
  logic fdiv, s1, s2, s3, bs_done, presc_mode;
  logic [4:0] band, band_d = 0;
  logic [1:0] n_a;
  logic [3:0] n_b;
  logic signed [3:0] n_offset;
  int unsigned f_lock_khz = 1600000;

  int n_step_up = 0, n_end_back = 0, n_end_low = 0, n_end_top = 0, n_restart = 0;
  int n_swallow = 0, n_plain = 0, n_neg = 0, n_pos = 0;

  vco_model u_vco (.band(band), .s1_vmin(s1), .f_lock_khz(f_lock_khz), .clk(vco));

  wbpll_top dut (
    .vco_clk(vco), .ref_clk(ref_clk), .rst_n(rst_n), .n_desired(n_desired),
    .fdiv(fdiv), .band(band), .s1_vmin(s1), .s2_normal(s2), .s3_search(s3),
    .bs_done(bs_done), .n_a(n_a), .n_b(n_b), .n_offset(n_offset), .presc_mode(presc_mode)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #12500 ref_clk = ~ref_clk;

  // Mechanism counters.
  always @(band) begin
    if (s1 && int'(band) == int'(band_d) + 1) n_step_up++;
    band_d = band;
  end
  always @(negedge dut.u_bs.hold) n_restart++;
  always @(posedge dut.u_fracn.u_div.presc_out) begin
    if (s2) begin
      if (presc_mode) n_swallow++; else n_plain++;
    end
  end
  always @(posedge fdiv) begin
    if (n_offset < 0) n_neg++;
    if (n_offset > 0) n_pos++;
  end

  function automatic real est(input int k);
    return (1140000.0 + k * 41562.0) / 40000.0;
  endfunction

  // One complete operation at modulus nd (real), over k divider periods.
  task automatic operate(input real nd, input int k);
    int cycles = 0, n, got = 0, warm = 4, cyc = 0, last = -1, exp_last = -1, exp_prev = -1;
    longint total = 0, t_first = 0, t_last = 0;
    logic [25:0] ndw;
    logic fdiv_d;
    ndw = 26'(longint'(nd * real'(1 << 19)));
    n = int'(ndw[25:19]);
    @(posedge ref_clk);
    n_desired = ndw;
    f_lock_khz = int'(nd * 40000.0);
    @(posedge ref_clk);
    check(s1 && s3 && !s2, "band search entered");
    while (!(s2 && !s1 && !s3) && cycles < 40) begin
      @(posedge ref_clk);
      cycles++;
    end
    check(cycles <= 33, $sformatf("search took %0d cycles", cycles));
    if (band > 0)  check(est(int'(band)) < n + 5.0, $sformatf("N=%0d band %0d too high", n, band));
    if (band < 31) check(est(int'(band) + 1) >= n - 6.0, $sformatf("N=%0d band %0d too low", n, band));
    if (band == 0 && est(0) >= n - 5.0 && cycles <= 2) n_end_low++;
    else if (band == 31) n_end_top++;
    else n_end_back++;
    // Fractional-N divider in the normal loop.
    fdiv_d = fdiv;
    while (got < k) begin
      @(posedge vco);
      cyc++;
      #1;
      if (fdiv && !fdiv_d) begin
        if (last >= 0 && exp_prev >= 0) begin
          if (warm > 0) begin
            warm--;
            if (warm == 0) t_first = longint'($time);
          end else begin
            check(cyc - last == exp_prev, $sformatf("period %0d expected %0d", cyc - last, exp_prev));
            total += longint'(cyc - last);
            got++;
            t_last = longint'($time);
          end
        end
        last = cyc;
        exp_prev = exp_last;
        exp_last = 2 * (int'(n_a) + 4 * int'(n_b));
      end
      fdiv_d = fdiv;
    end
    check(s2 && !s1 && !s3, "normal loop stayed closed");
    check((real'(total) / k - nd) < 0.02 && (nd - real'(total) / k) < 0.02,
          $sformatf("mean period %f vs %f", real'(total) / k, nd));
    check(real'(t_last - t_first) / k > 25000.0 * 0.995 && real'(t_last - t_first) / k < 25000.0 * 1.005,
          $sformatf("output period %f ps", real'(t_last - t_first) / k));
    $display("N_desired %f: band %0d after %0d ref cycles, mean divide %f, output period %0.1f ps",
             nd, band, cycles, real'(total) / k, real'(t_last - t_first) / k);
  endtask

  initial begin
    n_desired = 26'd40 << 19;
    #100 rst_n = 0;
    #30000 rst_n = 1;   // held over a falling reference edge (synchronous reset)
    repeat (40) @(posedge ref_clk);
    operate(45.3, 800);            // 1.812 GHz
    operate(26.0, 400);            // 1.04 GHz: below the VCO range (integer N)
    operate(60.123, 800);          // 2.405 GHz
    operate(68.8, 400);            // 2.752 GHz: above the band starts
    operate(33.75, 800);           // 1.35 GHz
    check(n_step_up > 0,  "mechanism: band step up");
    check(n_end_back > 0, "mechanism: search ended by stepping back");
    check(n_end_low > 0,  "mechanism: search ended below range");
    check(n_end_top > 0,  "mechanism: search ended on the top band");
    check(n_restart >= 5, "mechanism: restart on a new modulus");
    check(n_swallow > 0,  "mechanism: prescaler divide-by-1.25");
    check(n_plain > 0,    "mechanism: prescaler divide-by-1");
    check(n_neg > 0,      "mechanism: negative modulator offset");
    check(n_pos > 0,      "mechanism: positive modulator offset");
    $display("step-ups %0d, ends: back %0d low %0d top %0d, restarts %0d, prescaler 1.25/1: %0d/%0d, offsets -/+: %0d/%0d",
             n_step_up, n_end_back, n_end_low, n_end_top, n_restart, n_swallow, n_plain, n_neg, n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
