// Self-checking test of bs_counter. A 40 MHz reference (25 ns) and a pulse
// train of a randomly chosen period are applied; at each falling reference
// edge the count must equal the number of pulse rising edges the testbench
// saw while the reference was high (saturating at 31), and it must read zero
// while the reference is low.
module tb_bs_counter;
  int checks = 0, failures = 0;
  logic pulse = 0, ref_clk = 0;
  logic [4:0] count;
  int seen = 0, half_ps = 1000;
  bit stop = 0;

  bs_counter dut (.pulse_in(pulse), .ref_clk(ref_clk), .count(count));

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

  // Pulse generator, period 2*half_ps, offset so edges never meet ref edges.
  initial begin
    #7;
    while (!stop) begin
      #(half_ps) pulse = 1;
      if (ref_clk) seen++;
      #(half_ps) pulse = 0;
    end
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      half_ps = $urandom_range(3000, 250) | 1;
      #12500 ref_clk = 1;
      seen = 0;
      #12500;
      check(int'(count) == ((seen > 31) ? 31 : seen), $sformatf("count %0d seen %0d", count, seen));
      ref_clk = 0;
      #3 check(count == 0, "cleared while ref low");
      #1;
    end
    stop = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
