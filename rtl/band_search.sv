// Band-search (coarse tuning) loop of the double-loop PLL.
//
// Finds the VCO sub-band before the analog loop takes over. The VCO signal
// after the fixed divide-by-2 (through switch S3, applied outside) passes a D latch that is
// transparent while the reference clock is high; a counter, cleared while
// the reference is low, counts its pulses over that half period; a
// comparator checks the scaled count against the integer part of N_desired,
// and the FSM steps the band code at each falling reference edge.
// hold is generated here: it drops for one reference cycle whenever the
// integer part of N_desired differs from the value seen at the previous
// falling edge, which restarts the search. A new fraction alone does not
// restart it (this design's choice). Band code, S1..S3 and done come from
// the FSM; count is brought out for observation.
// rst_n is synchronous (falling reference edge) for the FSM and the modulus
// register, and asynchronous for the latch.
//
// The one latch bit left after synthesis is the intended D latch.
module band_search
  import wbpll_pkg::*;
#(
  parameter int unsigned BAND_BITS = BAND_W,
  parameter int unsigned CNT_W     = 5,
  parameter int unsigned NINT_W    = 7,
  parameter int unsigned SHIFT     = 2      // log2(2 * fixed divide ratio 2)
) (
  input  logic                 ref_clk,
  input  logic                 rst_n,
  input  logic                 div_in,     // fixed-divider output behind S3
  input  logic [NINT_W-1:0]    n_int,      // integer part of N_desired
  output logic [BAND_BITS-1:0] band,
  output logic                 s1,
  output logic                 s2,
  output logic                 s3,
  output logic                 done,
  output logic                 hold,
  output logic [CNT_W-1:0]     count
);
  logic              latched;
  logic              too_low;
  logic [NINT_W-1:0] n_prev;
  bs_state_t         state;

  d_latch u_latch (.clk(ref_clk), .rst_n(rst_n), .d(div_in), .q(latched), .qn());

  bs_counter #(.CNT_W(CNT_W)) u_cnt (.pulse_in(latched), .ref_clk(ref_clk), .count(count));

  bs_comparator #(.CNT_W(CNT_W), .NINT_W(NINT_W), .SHIFT(SHIFT)) u_cmp (
    .count(count), .n_int(n_int), .too_low(too_low)
  );

  // New-modulus detection.
  always_ff @(negedge ref_clk) begin
    if (!rst_n) n_prev <= '0;
    else        n_prev <= n_int;
  end
  assign hold = (n_prev == n_int);

  bs_fsm #(.BAND_BITS(BAND_BITS)) u_fsm (
    .ref_clk(ref_clk), .rst_n(rst_n), .hold(hold), .too_low(too_low),
    .band(band), .s1(s1), .s2(s2), .s3(s3), .done(done), .state(state)
  );
endmodule
