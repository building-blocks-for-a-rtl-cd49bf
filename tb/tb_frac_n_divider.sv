// Self-checking test of frac_n_divider behind the divide-by-8 (hf_div8).
// A VCO clock is applied and every output period is measured in VCO periods.
//  - The modulator updates at each rising output edge and the accumulator
//    takes A, B at the start of the next period, so each period must equal
//    2*(A + 4*B) for the A, B read just after the rising edge before the
//    one that started it; A, B must be the split of N_I + N_offset.
//  - Over a long run the mean period must equal N_desired: the total VCO
//    count over K periods may differ from K * N_desired by a few periods'
//    worth of modulator noise only.
// Several N_desired values are used, from the bottom to the top of the range.
module tb_frac_n_divider;
  int checks = 0, failures = 0;
  logic vco = 0, rst_n = 1;
  logic [3:0] ph;
  logic [25:0] n_desired;
  logic fout, fout_d = 0, mode;
  logic [1:0] n_a;
  logic [3:0] n_b;
  logic signed [3:0] n_offset;
  int cyc = 0, last = -1, exp_last = -1, exp_prev = -1;

  hf_div8 u_div8 (.vco_clk(vco), .rst_n(rst_n), .div2(), .ph(ph));
  frac_n_divider dut (.rst_n(rst_n), .ph(ph), .n_desired(n_desired), .fout(fout),
                      .n_a(n_a), .n_b(n_b), .n_offset(n_offset), .mode(mode));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 rst_n = 0;
  end

  initial begin : watchdog
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run K output periods at one N_desired (7.19 fixed point).
  task automatic run(input logic [25:0] nd, input int k);
    longint total = 0, target;
    int got = 0, warm = 4;
    real nd_real;
    n_desired = nd;
    nd_real = real'(nd) / real'(1 << 19);
    while (got < k) begin
      #200 vco = 1; cyc++;
      #200 vco = 0;
      if (fout && !fout_d) begin
        int nd_sum;
        if (last >= 0 && exp_prev >= 0) begin
          if (warm > 0) warm--;
          else begin
            check(cyc - last == exp_prev, $sformatf("period %0d expected %0d", cyc - last, exp_prev));
            total += longint'(cyc - last);
            got++;
          end
        end
        last = cyc;
        #1;
        nd_sum = int'(nd[25:20]) + int'(n_offset);
        check(int'(n_a) == nd_sum % 4 && int'(n_b) == nd_sum / 4, "A/B split of N_I + N_offset");
        exp_prev = exp_last;
        exp_last = 2 * (int'(n_a) + 4 * int'(n_b));
      end
      fout_d = fout;
    end
    target = longint'(nd) * k;      // in units of 2^-19 VCO periods
    check((total << 19) - target <= (longint'(16) << 19) && target - (total << 19) <= (longint'(16) << 19),
          $sformatf("mean period %f, N_desired %f", real'(total) / k, nd_real));
    $display("N_desired %f: mean period over %0d periods %f", nd_real, k, real'(total) / k);
  endtask

  initial begin
    n_desired = 26'd0;
    n_desired[25:19] = 7'd40;
    repeat (4) begin #200 vco = 1; #200 vco = 0; end
    rst_n = 1;
    run(26'(longint'(40.3 * (1 << 19))), 1500);
    run(26'(longint'(32.0 * (1 << 19))), 300);
    run(26'(longint'(57.123456 * (1 << 19))), 1500);
    run(26'(longint'(67.9 * (1 << 19))), 1500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
