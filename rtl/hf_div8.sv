// High-frequency divide-by-8: three cascaded latch-pair divide-by-2 stages.
//
// In silicon a source-coupled-logic buffer first converts the VCO swing to
// the internal logic level; in this digital model the VCO signal drives the
// first stage directly. Each stage halves the frequency of the one before.
// The last stage provides four outputs 90 degrees apart at f_vco/8, ordered
// by increasing delay: ph[0] = master, ph[1] = slave, ph[2] = ~master,
// ph[3] = ~slave. Adjacent phases are two VCO periods apart, which is the
// step the phase-select prescaler swallows. The quadrature phase order and
// the reset are this design's choices; the three-stage structure is the
// source design's. The first stage's output (f_vco/2) is also brought out:
// it is the fixed divide-by-2 of the frequency plan, the other two stages
// belonging functionally to the 4/5 prescaler, and it feeds the band search.
//
// Each stage is a loop through two level-sensitive latches, so lint tools
// report circular logic (UNOPTFLAT) and synthesis keeps six latch bits;
// both are intended, as the divider is latch based by construction.
module hf_div8 (
  input  logic       vco_clk,
  input  logic       rst_n,
  output logic       div2,     // f_vco/2 from the first stage
  output logic [3:0] ph        // four phases of f_vco/8, ph[k] lags by k*90 deg
);
  logic d2, d4, m8, q8;

  assign div2 = d2;

  dff_div2 u_st1 (.clk_in(vco_clk), .rst_n(rst_n), .m(),   .q(d2));
  dff_div2 u_st2 (.clk_in(d2),      .rst_n(rst_n), .m(),   .q(d4));
  dff_div2 u_st3 (.clk_in(d4),      .rst_n(rst_n), .m(m8), .q(q8));

  assign ph = {~q8, ~m8, q8, m8};
endmodule
