// Self-checking test of mirror_full_adder: all 8 input combinations against
// the arithmetic sum a + b + ci.
// Purely combinational; the outputs are checked as the complements of the
// carry and sum bits, as the mirror adder produces inverted outputs.
module tb_mirror_full_adder;
  int checks = 0, failures = 0;
  logic a, b, ci, con, sn;

  mirror_full_adder dut (.a(a), .b(b), .ci(ci), .con(con), .sn(sn));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int s;
      {a, b, ci} = 3'(i);
      s = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if (con != ~1'(s / 2)) begin failures++; $display("FAIL carry %b%b%b", a, b, ci); end
      checks++;
      if (sn != ~1'(s % 2)) begin failures++; $display("FAIL sum %b%b%b", a, b, ci); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
