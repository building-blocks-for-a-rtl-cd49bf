// A/B accumulator of the programmable divider.
//
// Clocked by the prescaler output. For each output cycle it latches a new
// pair (A, B), loads B-1 and counts down to 0, B prescaler cycles in all,
// then reloads (the synchronous reset to B-1). The sign of (count - A) is the
// prescaler control: the count is below A for exactly A of the B cycles, and
// those cycles run with the prescaler at 1.25 (mode = 1); the other B-A run
// at 1. With the divide-by-8 in front, one output period is
// 8*(B-A) + 10*A = 2*(A + 4*B) VCO periods.
// mode is computed from the next count, so the value seen at a clock edge
// governs the prescaler cycle starting at that edge. fout is a registered
// pulse, high during the first prescaler cycle of each output period, so its
// rising edge marks the start of a period.
// A and B are sampled only at the reload, so they may change at any time
// during a period. Counting down from B-1 follows the source design's detailed
// description; the pulse shape of fout is this design's choice.
//
// rst_n is also used in the assertion's disable condition; that is the only
// reason lint sees it as both an asynchronous and a synchronous input.
module pd_accumulator #(
  parameter int unsigned A_W = 2,
  parameter int unsigned B_W = 4
) (
  input  logic           clk,      // prescaler output
  input  logic           rst_n,
  input  logic [A_W-1:0] a_in,
  input  logic [B_W-1:0] b_in,
  output logic           mode,     // 1: prescaler divides by 1.25
  output logic           fout,     // divider output
  output logic           reload    // high in the cycle that reloads
);
  logic [B_W-1:0] cnt, cnt_nxt;
  logic [A_W-1:0] a_q, a_nxt;

  assign reload = (cnt == '0);

  always_comb begin
    if (reload) begin
      cnt_nxt = b_in - 1'b1;
      a_nxt   = a_in;
    end else begin
      cnt_nxt = cnt - 1'b1;
      a_nxt   = a_q;
    end
  end

  assign mode = ({{(B_W-A_W){1'b0}}, a_nxt} > cnt_nxt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      a_q  <= '0;
      fout <= 1'b0;
    end else begin
      cnt  <= cnt_nxt;
      a_q  <= a_nxt;
      fout <= reload;
    end
  end

  // The modulus pair must satisfy 1 <= B and A <= B.
  a_b_valid: assert property (@(posedge clk) disable iff (!rst_n)
    reload |-> (b_in != '0) && ({{(B_W-A_W){1'b0}}, a_in} <= b_in));
endmodule
