// Self-checking test of band_search with the VCO model and the divide-by-8
// (its first-stage output f_vco/2 feeds the search, gated by S3 as in the
// top level). For each integer target N a search is started by changing N
// (hold drops for one reference cycle) and must finish in LOCK within 33
// reference cycles with S1 = 0, S2 = 1, S3 = 0. The chosen band b is checked
// against the band frequencies f_k / f_ref = est(k): the count resolves
// est to 4 units. A count can be one low (an edge just outside the window)
// or up to about 1.4 high (an edge just inside plus the latch opening while
// f_vco/2 is high), so b > 0 needs est(b) < N + 5 and b < 31 needs
// est(b+1) >= N - 6. Targets below and above
// the VCO range must end on band 0 and band 31.
module tb_band_search;
  int checks = 0, failures = 0;
  logic ref_clk = 1, rst_n = 1, vco;
  logic [4:0] band;
  logic s1, s2, s3, done, hold;
  logic [4:0] count;
  logic [3:0] ph;
  logic div2;
  logic [6:0] n_int = 7'd40;
  int n_done = 0, n_restart = 0;

  vco_model u_vco (.band(band), .s1_vmin(s1), .f_lock_khz(1600000), .clk(vco));
  hf_div8 u_div8 (.vco_clk(vco), .rst_n(rst_n), .div2(div2), .ph(ph));
  band_search dut (.ref_clk(ref_clk), .rst_n(rst_n), .div_in(div2 & s3), .n_int(n_int),
                   .band(band), .s1(s1), .s2(s2), .s3(s3), .done(done), .hold(hold), .count(count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #12500 ref_clk = ~ref_clk;
  always @(posedge done) n_done++;
  always @(negedge hold) n_restart++;

  function automatic real est(input int k);
    return (1140000.0 + k * 41562.0) / 40000.0;
  endfunction

  task automatic search(input int n);
    int cycles = 0;
    @(posedge ref_clk);
    n_int = 7'(n);
    @(posedge ref_clk);
    check(s1 && s3 && !s2, "search entered");
    while (!(s2 && !s1 && !s3) && cycles < 40) begin
      @(posedge ref_clk);
      cycles++;
    end
    check(cycles <= 33, $sformatf("search took %0d cycles", cycles));
    if (band > 0)  check(est(int'(band)) < n + 5.0, $sformatf("N=%0d band %0d too high (est %f)", n, band, est(int'(band))));
    if (band < 31) check(est(int'(band) + 1) >= n - 6.0, $sformatf("N=%0d band %0d too low", n, band));
    $display("N=%0d -> band %0d (f_min %0.1f MHz), %0d cycles", n, band, est(int'(band)) * 40.0, cycles);
    repeat (3) @(posedge ref_clk);
    check(!s1 && s2 && !s3, "stays locked");
  endtask

  initial begin
    #100 rst_n = 0;
    #30000 rst_n = 1;   // held over a falling reference edge (synchronous reset)
    repeat (40) @(posedge ref_clk);
    search(20);
    check(band == 0, "below range ends on band 0");
    search(75);
    check(band == 31, "above range ends on band 31");
    search(30);
    search(45);
    search(52);
    search(60);
    check(n_done >= 6 && n_restart >= 6, $sformatf("done %0d restarts %0d", n_done, n_restart));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
