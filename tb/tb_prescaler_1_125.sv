// Self-checking test of prescaler_1_125, fed by the divide-by-8 (hf_div8).
// mode is drawn at random for every output period. Each period, counted in
// VCO periods between output rising edges, must be 8 with mode low and 10
// (a quarter of 8 swallowed) with mode high. Spike freedom: every high and
// low pulse of the output must last at least 2 VCO periods.
module tb_prescaler_1_125;
  int checks = 0, failures = 0;
  logic vco = 0, rst_n = 1, mode = 0;
  logic [3:0] ph;
  logic out;
  int cyc = 0, last_rise = -1, last_edge = 0, n_swallow = 0, n_plain = 0;
  logic mode_at_rise;
  logic out_d = 0;

  hf_div8 u_div8 (.vco_clk(vco), .rst_n(rst_n), .div2(), .ph(ph));
  prescaler_1_125 dut (.ph(ph), .rst_n(rst_n), .mode(mode), .clk_out(out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reset pulse: the asynchronous resets act on the falling edge.
  initial begin
    #1 rst_n = 0;
  end

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count rising and falling output edges at any time to see spikes.
  int n_rise_any = 0;
  int n_det = 0;
  always @(posedge out) n_rise_any++;
  // New mode in mid-period, for the period starting at the next rising edge.
  always @(negedge out) mode = 1'($urandom_range(1));

  initial begin
    repeat (4) begin #10 vco = 1; #10 vco = 0; end
    rst_n = 1;
    n_rise_any = 0;   // edges before the reset do not count
    for (int i = 0; i < 4000; i++) begin
      #10 vco = 1; cyc++;
      #10 vco = 0;
      #1;
      if (out && !out_d) begin
        if (last_rise >= 0) begin
          check(cyc - last_rise == (mode_at_rise ? 10 : 8),
                $sformatf("period %0d with mode %b", cyc - last_rise, mode_at_rise));
          if (mode_at_rise) n_swallow++; else n_plain++;
        end
        mode_at_rise = mode;
        n_det++;
        last_rise = cyc;
      end
      if (out != out_d) begin
        check(cyc - last_edge >= 2, "pulse shorter than 2 VCO periods");
        last_edge = cyc;
      end
      out_d = out;
      #8;
    end
    check(n_swallow > 50 && n_plain > 50, "both modes exercised");
    check(n_rise_any == n_det, "no extra (zero-width) rising edges");
    $display("periods divide-by-1: %0d, divide-by-1.25: %0d", n_plain, n_swallow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
