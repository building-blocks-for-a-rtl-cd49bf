// Self-checking test of phase_select_ctrl: the output clock is driven
// directly with a random mode per cycle. The early select must advance by
// one (mod 4) at a rising edge only when mode was high, and the late select
// must equal the early select after each falling edge.
// Timing: 11 ps output clock; mode changes 5 ps before each rising edge.
module tb_phase_select_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, mode = 0;
  logic [1:0] sel_e, sel_l;
  int exp_e, exp_l;

  phase_select_ctrl dut (.clk_out(clk), .rst_n(rst_n), .mode(mode), .sel_early(sel_e), .sel_late(sel_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reset pulse: the asynchronous resets act on the falling edge.
  initial begin
    #1 rst_n = 0;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2;
    check(sel_e == 0 && sel_l == 0, "reset");
    rst_n = 1;
    exp_e = 0; exp_l = 0;
    for (int i = 0; i < 500; i++) begin
      mode = 1'($urandom_range(1));
      #5 clk = 1;
      if (mode) exp_e = (exp_e + 1) % 4;
      #1 check(sel_e == 2'(exp_e), $sformatf("early after rise %0d", i));
      check(sel_l == 2'(exp_l), "late holds at rise");
      #4 clk = 0;
      exp_l = exp_e;
      #1 check(sel_l == 2'(exp_l), $sformatf("late after fall %0d", i));
      check(sel_e == 2'(exp_e), "early holds at fall");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
