// Channel-grid workload for wbpll_top at its default size: the PLL is asked
// for a series of output frequencies on the 25 kHz channel grid with the
// 40 MHz reference, from 1.3 GHz to 2.7 GHz (the VCO range the divider plan
// is built for). Six fixed channels (the two range ends and four in the
// cellular bands) and six random ones are run.
// For each channel, N_desired = f / 40 MHz is rounded to the 19 fractional
// bits of the input. The testbench waits for the band search to finish
// (S2 closed; the VCO model then runs at the requested frequency, standing
// in for a settled analog loop). It then sums the VCO periods of
// K = 32768 divider periods and checks two things:
//  - the sum is within 16 VCO periods of K * N_desired, i.e. the mean
//    division ratio is correct to 5e-4, which is 20 kHz at 40 MHz, finer
//    than the channel spacing;
//  - every divider period lies in 24..78 VCO periods.
// It also prints the resulting frequency error against the channel.
// Timing: 1 ps resolution, reference half period 12.5 ns.
module tb_wbpll_channels;
  localparam int K = 32768;
  int checks = 0, failures = 0;
  logic ref_clk = 1, rst_n = 1, vco;
  logic [25:0] n_desired = 26'd40 << 19;
  logic fdiv, s1, s2, s3, bs_done, presc_mode;
  logic [4:0] band;
  logic [1:0] n_a;
  logic [3:0] n_b;
  logic signed [3:0] n_offset;
  int unsigned f_lock_khz = 1600000;

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
    #20000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #12500 ref_clk = ~ref_clk;

  // One channel: f_khz must be a multiple of 25.
  task automatic channel(input int unsigned f_khz);
    longint ndw, total = 0, want_x;
    int cyc = 0, last = -1, got = 0, warm = 4, waited = 0, p;
    logic fdiv_d;
    real err_hz;
    // N_desired * 2^19 = f_khz * 2^19 / 40000, rounded.
    ndw = (longint'(f_khz) * (longint'(1) << 19) + 20000) / 40000;
    @(posedge ref_clk);
    n_desired = 26'(ndw);
    f_lock_khz = f_khz;
    repeat (2) @(posedge ref_clk);
    while (!(s2 && !s1 && !s3) && waited < 40) begin
      @(posedge ref_clk);
      waited++;
    end
    check(waited < 40, $sformatf("%0d kHz: band search did not end", f_khz));
    fdiv_d = fdiv;
    while (got < K) begin
      @(posedge vco);
      cyc++;
      #1;
      if (fdiv && !fdiv_d) begin
        if (last >= 0) begin
          if (warm > 0) warm--;
          else begin
            p = cyc - last;
            if (p < 24 || p > 78) check(0, $sformatf("%0d kHz: period %0d", f_khz, p));
            total += longint'(p);
            got++;
          end
        end
        last = cyc;
      end
      fdiv_d = fdiv;
    end
    // Compare total with K * ndw / 2^19, both scaled by 2^19.
    want_x = longint'(K) * ndw;
    check((total << 19) - want_x <= (longint'(16) << 19) && want_x - (total << 19) <= (longint'(16) << 19),
          $sformatf("%0d kHz: %0d VCO periods in %0d divider periods, expected %f",
                    f_khz, total, K, real'(want_x) / 524288.0));
    err_hz = (real'(f_khz) * 1000.0) * (1.0 - real'(K) * real'(ndw) / 524288.0 / real'(total));
    $display("channel %0d kHz: band %0d, mean divide %f, frequency error %0.1f Hz",
             f_khz, band, real'(total) / K, err_hz);
  endtask

  initial begin
    int unsigned f;
    #100 rst_n = 0;
    #30000 rst_n = 1;   // held over a falling reference edge (synchronous reset)
    repeat (40) @(posedge ref_clk);
    channel(1300000);     // low end of the divider plan
    channel(1805200);     // DCS1800 region
    channel(1930025);     // PCS1900 region
    channel(1474975);     // PDC 1.5 GHz region
    channel(2112475);     // upper cellular region
    channel(2700000);     // high end of the divider plan
    repeat (6) begin
      f = 1300000 + 25 * ($urandom % 56000);
      channel(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
