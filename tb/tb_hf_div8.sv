// Self-checking test of hf_div8: counts VCO periods between edges. Every
// phase must have a period of 8 VCO periods with 4 high, and phase k must rise
// 2*k VCO periods after phase 0. The first-stage output div2 must toggle
// once per VCO period.
// Timing: 30 ps VCO period (high 10 ps). The phase order checked here (ph[k] lags by
// k*90 degrees) is the one this design defines.
module tb_hf_div8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [3:0] ph, ph_d;
  logic div2;
  int cyc = 0;
  int last_rise [4];
  int last_fall [4];

  hf_div8 dut (.vco_clk(clk), .rst_n(rst_n), .div2(div2), .ph(ph));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reset pulse: the asynchronous resets act on the falling edge.
  initial begin
    #1 rst_n = 0;
  end

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin last_rise[k] = -1; last_fall[k] = -1; end
    repeat (3) begin #10 clk = 1; #10 clk = 0; end
    check(ph == 4'b1100, "reset phases");
    rst_n = 1;
    ph_d = ph;
    for (int i = 0; i < 800; i++) begin
      #10 clk = 1; cyc++;
      #10 clk = 0;
      #1;
      check(div2 == 1'(cyc % 2), $sformatf("div2 after %0d VCO periods", cyc));
      for (int k = 0; k < 4; k++) begin
        if (ph[k] && !ph_d[k]) begin
          if (last_rise[k] >= 0) check(cyc - last_rise[k] == 8, $sformatf("phase %0d period", k));
          if (last_fall[k] >= 0) check(cyc - last_fall[k] == 4, $sformatf("phase %0d low time", k));
          last_rise[k] = cyc;
          if (k > 0 && last_rise[0] >= 0)
            check(((cyc - last_rise[0]) % 8) == 2 * k, $sformatf("phase %0d lag", k));
        end
        if (!ph[k] && ph_d[k]) begin
          if (last_rise[k] >= 0) check(cyc - last_rise[k] == 4, $sformatf("phase %0d high time", k));
          last_fall[k] = cyc;
        end
      end
      ph_d = ph;
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
