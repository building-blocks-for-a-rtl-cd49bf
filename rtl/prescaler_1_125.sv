// Spike-free divide-by-1/1.25 phase-select prescaler (parallel phase selection).
//
// Input: the four quadrature phases of the divide-by-8 output. With mode low
// the output stays connected to one phase: divide by 1. With mode high the
// connection moves to the next, 90-degree later phase at every output rising
// edge, so each output period is stretched by a quarter: divide by 1.25
// (10 instead of 8 VCO periods). Two multiplexers run in parallel: the early
// one switches at the rising edge, the late one follows at the falling edge,
// and the output is the OR of the two. When the early one moves to a phase
// that is still low, the late one still holds the old, high phase, so the
// output has no spike. The mode value presented before a rising edge sets
// the length of the output period that starts at that edge.
module prescaler_1_125 (
  input  logic [3:0] ph,       // ph[k] lags ph[0] by k*90 degrees
  input  logic       rst_n,
  input  logic       mode,
  output logic       clk_out
);
  logic [1:0] sel_e, sel_l;
  logic       y_e, y_l;

  phase_mux4 u_mux_early (.ph(ph), .sel(sel_e), .y(y_e));
  phase_mux4 u_mux_late  (.ph(ph), .sel(sel_l), .y(y_l));

  assign clk_out = y_e | y_l;

  phase_select_ctrl u_ctrl (
    .clk_out  (clk_out),
    .rst_n    (rst_n),
    .mode     (mode),
    .sel_early(sel_e),
    .sel_late (sel_l)
  );
endmodule
