// Self-checking test of bs_comparator with its default shift of 2: every
// count 0..31 against every 7-bit modulus; too_low must be 4*count < n.
// Purely combinational, checked 1 ps after each input change. The x4
// scaling mirrors this design's choice of counting f_vco/2 pulses.
module tb_bs_comparator;
  int checks = 0, failures = 0;
  logic [4:0] count;
  logic [6:0] n_int;
  logic too_low;

  bs_comparator dut (.count(count), .n_int(n_int), .too_low(too_low));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++)
      for (int n = 0; n < 128; n++) begin
        count = 5'(c); n_int = 7'(n);
        #1;
        checks++;
        if (too_low != (4 * c < n)) begin
          failures++;
          $display("FAIL count=%0d n=%0d too_low=%b", c, n, too_low);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
