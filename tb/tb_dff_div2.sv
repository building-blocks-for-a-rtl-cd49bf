// Self-checking test of dff_div2: after reset, the slave output must equal
// the parity of the number of falling input edges and the master output the
// parity of the number of rising edges; the output period must be two input
// periods and the master must lead the slave by one half input period.
// Timing: 14 ps input period; the reset is dropped at 1 ps so the
// asynchronous clear sees a falling edge.
module tb_dff_div2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, m, q;
  int n_rise = 0, n_fall = 0;

  dff_div2 dut (.clk_in(clk), .rst_n(rst_n), .m(m), .q(q));

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
    #5 clk = 1; #5 clk = 0; #5;
    check(m == 0 && q == 0, "reset state");
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      #5 clk = 1; n_rise++;
      #1 check(m == 1'(n_rise % 2), $sformatf("m after rise %0d", n_rise));
      check(q == 1'(n_fall % 2), "q steady at rise");
      #4 clk = 0; n_fall++;
      #1 check(q == 1'(n_fall % 2), $sformatf("q after fall %0d", n_fall));
      check(m == 1'(n_rise % 2), "m steady at fall");
      #3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
