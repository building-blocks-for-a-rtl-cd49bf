// Self-checking test of sd_stage1 (FRAC_W = 20). A reference accumulator
// kept in the testbench (r = x + frac(r), q = integer part) is compared with
// the stage's q and err every clock, for random and for fixed inputs. Over a
// long run with a fixed x the count of q = 1 must equal x * n / 2^20 to
// within one.
module tb_sd_stage1;
  localparam int W = 20;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1;
  logic [W-1:0] x = 0, err;
  logic q;
  longint r, ones;

  sd_stage1 #(.FRAC_W(W)) dut (.clk(clk), .clr(clr), .x(x), .q(q), .err(err));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    #5 clk = 1;
    if (clr) r = 0;
    else     r = longint'(x) + (r % (64'd1 << W));
    #1;
    check(q == 1'(r >> W), $sformatf("q: got %b, r=%0d", q, r));
    check(err == W'(r), "err");
    #4 clk = 0;
  endtask

  initial begin
    r = 0;
    tick(); tick();
    clr = 0;
    for (int i = 0; i < 2000; i++) begin
      x = W'($urandom);
      tick();
    end
    // Fixed input: average of q.
    clr = 1; tick(); clr = 0;
    x = 20'd349525;             // about 1/3
    ones = 0;
    for (int i = 0; i < 3000; i++) begin
      tick();
      ones += longint'(q);
    end
    check(ones * (64'd1 << W) <= 64'd349525 * 3000 + (64'd1 << W) &&
          ones * (64'd1 << W) + (64'd1 << W) >= 64'd349525 * 3000, $sformatf("average %0d", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
