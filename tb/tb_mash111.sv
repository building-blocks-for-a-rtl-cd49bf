// Self-checking test of mash111 (20-bit input, 4-bit signed output).
// Three checks each clock, for random fractions held for a while:
//  1. a reference model of the three cascaded accumulators and the
//     recombination N1 + N2 + N3 written in the testbench;
//  2. the closed form of the cascade, z^-3 F + (1 - z^-1)^3 E3: after clock
//     edge n, N_offset * 2^20 equals F(n-2) - (e3(n) - 3 e3(n-1) +
//     3 e3(n-2) - e3(n-3)), where F(k) is the fraction sampled at edge k
//     (it is visible in the first register one sample later, hence z^-3)
//     and e3 is the third stage's residue (minus its quantization error);
//  3. the output stays within -3..+4.
// At the end, the mean over a long run with a fixed F must equal F / 2^20.
module tb_mash111;
  localparam int W = 20;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1;
  logic [W-1:0] f = 0;
  logic signed [3:0] n_offset;
  longint r1, r2, r3, f_h[4], e3_h[4];
  int q1_h[3], q2_h[3], q3_h[3];
  int exp_n, min_seen = 99, max_seen = -99;
  longint sum_off, fn;

  mash111 dut (.clk(clk), .clr(clr), .f(f), .n_offset(n_offset));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint ONE = 64'd1 << W;

  task automatic tick();
    longint n1, n2, n3;
    #5 clk = 1;
    if (clr) begin
      r1 = 0; r2 = 0; r3 = 0;
      for (int k = 0; k < 3; k++) begin q1_h[k] = 0; q2_h[k] = 0; q3_h[k] = 0; end
      for (int k = 0; k < 4; k++) begin f_h[k] = 0; e3_h[k] = 0; end
    end else begin
      // shift histories (index 0 = newest)
      for (int k = 2; k > 0; k--) begin q1_h[k] = q1_h[k-1]; q2_h[k] = q2_h[k-1]; q3_h[k] = q3_h[k-1]; end
      for (int k = 3; k > 0; k--) begin f_h[k] = f_h[k-1]; e3_h[k] = e3_h[k-1]; end
      r3 = (r2 % ONE) + (r3 % ONE);
      r2 = (r1 % ONE) + (r2 % ONE);
      r1 = longint'(f) + (r1 % ONE);
      q1_h[0] = int'(r1 / ONE); q2_h[0] = int'(r2 / ONE); q3_h[0] = int'(r3 / ONE);
      f_h[0] = longint'(f);
      e3_h[0] = r3 % ONE;
    end
    #1;
    n1 = q1_h[2];
    n2 = q2_h[1] - q2_h[2];
    n3 = q3_h[0] - 2 * q3_h[1] + q3_h[2];
    exp_n = int'(n1 + n2 + n3);
    check(int'(n_offset) == exp_n, $sformatf("model: got %0d exp %0d", n_offset, exp_n));
    if (!clr) begin
      check(longint'(n_offset) * ONE == f_h[2] - (e3_h[0] - 3 * e3_h[1] + 3 * e3_h[2] - e3_h[3]),
            $sformatf("closed form N = z^-3 F + (1-z^-1)^3 E3: n=%0d f2=%0d e3=%0d %0d %0d %0d", n_offset, f_h[2], e3_h[0], e3_h[1], e3_h[2], e3_h[3]));
    end
    check(n_offset >= -3 && n_offset <= 4, "range");
    if (int'(n_offset) < min_seen) min_seen = int'(n_offset);
    if (int'(n_offset) > max_seen) max_seen = int'(n_offset);
    #4 clk = 0;
  endtask

  initial begin
    tick(); tick();
    clr = 0;
    for (int i = 0; i < 4000; i++) begin
      if (i % 50 == 0) f = W'($urandom);
      tick();
    end
    // Long-run mean with a fixed fraction.
    f = 20'd123457;
    repeat (8) tick();
    sum_off = 0;
    fn = longint'(123457) * 20000;
    for (int i = 0; i < 20000; i++) begin
      tick();
      sum_off += longint'(n_offset);
    end
    // sum*2^20 - n*F is bounded by a few LSB of the output.
    check((sum_off * ONE - fn) <= 8 * ONE &&
          (sum_off * ONE - fn) >= -8 * ONE,
          $sformatf("mean: sum %0d vs %0d", sum_off, (fn) / ONE));
    check(min_seen < 0 && max_seen > 1, "output uses negative and multi-level values");
    $display("output range seen: %0d..%0d", min_seen, max_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
