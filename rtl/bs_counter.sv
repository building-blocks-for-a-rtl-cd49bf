// Pulse counter of the band-search loop.
//
// Counts rising edges of its input (the divided VCO signal after the
// reference-gated D latch). The reference clock is its reset: while ref is
// low the count is held at zero, while ref is high it counts, so at the
// falling edge of ref the count holds the number of pulses seen in one half
// reference period, a measure of the VCO frequency. The count saturates at
// its maximum instead of wrapping (this design's choice), so a very fast
// input still reads as "too high".
module bs_counter #(
  parameter int unsigned CNT_W = 5
) (
  input  logic             pulse_in,
  input  logic             ref_clk,
  output logic [CNT_W-1:0] count
);
  logic clr;
  assign clr = ~ref_clk;

  always_ff @(posedge pulse_in or posedge clr) begin
    if (clr)             count <= '0;
    else if (~&count)    count <= count + 1'b1;
  end
endmodule
