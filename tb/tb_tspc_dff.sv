// Self-checking test of tspc_dff: random data; qn must show the complement
// of d as sampled at the last rising edge, and must not move otherwise.
// Timing: 10 ps clock period, data changes away from the rising edge; the
// inverted output follows the flip-flop drawn for the modulator.
module tb_tspc_dff;
  int checks = 0, failures = 0;
  logic clk = 0, d = 0, qn;
  logic sampled;

  tspc_dff dut (.clk(clk), .d(d), .qn(qn));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      d = 1'($urandom_range(1));
      #5 clk = 1; sampled = d;
      #1 checks++;
      if (qn != ~sampled) begin failures++; $display("FAIL edge %0d", i); end
      d = ~d;             // change d while clk is high: qn must hold
      #2 checks++;
      if (qn != ~sampled) begin failures++; $display("FAIL hold %0d", i); end
      #2 clk = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
