// Self-checking test of d_latch: random data and clock, compared each step
// with a reference value that follows d while clk is high and holds while
// clk is low; the asynchronous clear is exercised at the start and midway.
// Timing: one random step every 1 ps; the reference model is updated in
// the same step. The high-transparent polarity is this design's choice.
module tb_d_latch;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, d = 0, q, qn;
  logic ref_q;

  d_latch dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .qn(qn));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clk = 1; #1;
    check(q == 0 && qn == 1, "reset clears");
    rst_n = 1; ref_q = 0;
    for (int i = 0; i < 2000; i++) begin
      clk = 1'($urandom_range(1));
      d   = 1'($urandom_range(1));
      if (i == 1000) rst_n = 0;
      if (i == 1001) rst_n = 1;
      #1;
      if (!rst_n)   ref_q = 0;
      else if (clk) ref_q = d;
      check(q == ref_q, $sformatf("step %0d clk=%b d=%b q=%b exp=%b", i, clk, d, q, ref_q));
      check(qn == ~ref_q, "qn complement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
