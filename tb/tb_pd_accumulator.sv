// Self-checking test of pd_accumulator, clocked directly. A and B are drawn
// at random (1 <= B <= 15, A <= min(B, 3)) and may change at any time. For
// every output period the test checks: the period lasts B cycles of the A/B
// pair taken at its start, mode is high in exactly its last A cycles, and
// fout is high only in its first cycle.
module tb_pd_accumulator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, mode, fout, reload;
  logic [1:0] a_in = 0;
  logic [3:0] b_in = 3;
  int pa, pb, pos, n_periods = 0;
  bit started = 0;

  pd_accumulator dut (.clk(clk), .rst_n(rst_n), .a_in(a_in), .b_in(b_in),
                      .mode(mode), .fout(fout), .reload(reload));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reset pulse: the asynchronous resets act on the falling edge.
  initial begin
    #1 rst_n = 0;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3 rst_n = 1;
    check(reload == 1, "reload after reset");
    for (int i = 0; i < 5000; i++) begin
      logic m_before, rl_before;
      if ($urandom_range(7) == 0) begin
        b_in = 4'($urandom_range(15, 1));
        a_in = 2'($urandom_range((b_in < 3) ? b_in : 3));
      end
      #1;
      m_before  = mode;     // mode for the cycle that starts at this edge
      rl_before = reload;
      if (rl_before) begin
        if (started) begin
          check(pos == pb, $sformatf("period length %0d, B=%0d", pos, pb));
          n_periods++;
        end
        started = 1;
        pa = a_in; pb = b_in; pos = 0;
      end
      #4 clk = 1;
      #1;
      pos++;
      if (started) begin
        check(m_before == (pos > pb - pa), $sformatf("mode in cycle %0d of A=%0d B=%0d", pos, pa, pb));
        check(fout == (pos == 1), $sformatf("fout in cycle %0d", pos));
      end
      #4 clk = 0;
    end
    check(n_periods > 500, "enough periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
