// Control logic of the parallel phase-selection prescaler.
//
// Holds two 2-bit phase selects, one for each of the two parallel
// multiplexers. The "early" select advances by one phase (90 degrees later,
// modulo 4) at each rising edge of the prescaler output while mode is high,
// and stays put while mode is low. The "late" select copies the early select
// at each falling edge of the output. Because the two multiplexers never
// switch at the same edge, the OR of their outputs carries no spike. Both
// selects are cleared to phase 0 by the asynchronous reset, so both
// multiplexers start on the same input, as the scheme requires.
// Clocking by the output's own edges follows the source design; the reset
// value and the mode sampling at the rising edge are this design's choices.
module phase_select_ctrl (
  input  logic       clk_out,   // prescaler output, clocks this logic
  input  logic       rst_n,
  input  logic       mode,      // 1: swallow a quarter period this cycle
  output logic [1:0] sel_early,
  output logic [1:0] sel_late
);
  always_ff @(posedge clk_out or negedge rst_n) begin
    if (!rst_n)    sel_early <= 2'd0;
    else if (mode) sel_early <= sel_early + 2'd1;
  end

  always_ff @(negedge clk_out or negedge rst_n) begin
    if (!rst_n) sel_late <= 2'd0;
    else        sel_late <= sel_early;
  end
endmodule
