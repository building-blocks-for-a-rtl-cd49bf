// 4:1 phase multiplexer of the phase-select prescaler.
//
// Passes one of the four quadrature phases of the divide-by-8 to its output,
// chosen by a 2-bit select. In silicon this is a two-level differential
// source-coupled-logic tree; here it is plain combinational logic. The
// binary select encoding (sel = k picks the phase delayed by k*90 degrees)
// is this design's choice. Purely combinational, no timing of its own.
module phase_mux4 (
  input  logic [3:0] ph,
  input  logic [1:0] sel,
  output logic       y
);
  always_comb begin
    unique case (sel)
      2'd0: y = ph[0];
      2'd1: y = ph[1];
      2'd2: y = ph[2];
      2'd3: y = ph[3];
    endcase
  end
endmodule
