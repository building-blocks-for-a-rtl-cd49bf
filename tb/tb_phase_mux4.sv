// Self-checking test of phase_mux4: all 64 input/select combinations.
// Purely combinational: each combination is applied and checked after 1 ps.
// The expected value is ph[sel]; the binary select encoding is this
// design's choice.
module tb_phase_mux4;
  int checks = 0, failures = 0;
  logic [3:0] ph;
  logic [1:0] sel;
  logic y;

  phase_mux4 dut (.ph(ph), .sel(sel), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 16; p++)
      for (int s = 0; s < 4; s++) begin
        ph = 4'(p); sel = 2'(s);
        #1;
        checks++;
        if (y != ((p >> s) & 1)) begin
          failures++;
          $display("FAIL ph=%b sel=%0d y=%b", ph, sel, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
