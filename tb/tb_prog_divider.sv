// Self-checking test of prog_divider behind the divide-by-8 (hf_div8),
// i.e. the complete divider from the VCO. Every pair A = 0..3, B = 3..8 is
// held for several output periods; each period between rising edges of the
// output must last 2*(A + 4*B) VCO periods, covering 24..70 in steps of 2.
// It includes the two settings shown for a 3 GHz input: A=0, B=3 gives 24
// (8 ns) and A=3, B=5 gives 46 (15.33 ns). A few periods right after a
// change are skipped because the new pair is taken at the next period start.
module tb_prog_divider;
  int checks = 0, failures = 0;
  logic vco = 0, rst_n = 1;
  logic [3:0] ph;
  logic [1:0] a_in = 0;
  logic [3:0] b_in = 3;
  logic fout, fout_d = 0;
  int cyc = 0, last = -1, seen_min = 1000, seen_max = 0;

  hf_div8 u_div8 (.vco_clk(vco), .rst_n(rst_n), .div2(), .ph(ph));
  prog_divider dut (.ph(ph), .rst_n(rst_n), .a_in(a_in), .b_in(b_in),
                    .fout(fout), .presc_out(), .mode());

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reset pulse: the asynchronous resets act on the falling edge.
  initial begin
    #1 rst_n = 0;
  end

  initial begin : watchdog
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run the VCO (period 333 ps, about 3 GHz) for n output periods.
  task automatic run_periods(input int n, input int a, input int b);
    int got = 0, skip = 2;
    a_in = 2'(a); b_in = 4'(b);
    last = -1;
    while (got < n) begin
      #167 vco = 1; cyc++;
      #166 vco = 0;
      if (fout && !fout_d) begin
        if (last >= 0) begin
          if (skip > 0) skip--;
          else begin
            check(cyc - last == 2 * (a + 4 * b),
                  $sformatf("A=%0d B=%0d period %0d expected %0d", a, b, cyc - last, 2 * (a + 4 * b)));
            if (cyc - last < seen_min) seen_min = cyc - last;
            if (cyc - last > seen_max) seen_max = cyc - last;
            got++;
          end
        end
        last = cyc;
      end
      fout_d = fout;
    end
  endtask

  initial begin
    repeat (4) begin #167 vco = 1; #166 vco = 0; end
    rst_n = 1;
    run_periods(4, 0, 3);
    run_periods(4, 3, 5);
    for (int b = 3; b <= 8; b++)
      for (int a = 0; a <= 3; a++)
        run_periods(3, a, b);
    check(seen_min == 24 && seen_max == 70, $sformatf("range %0d..%0d", seen_min, seen_max));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
