// True single-phase-clock (TSPC) D flip-flop with inverted output.
//
// A TSPC flip-flop uses one clock phase only, with three dynamic stages;
// the circuit samples d at the rising edge of clk and presents its
// complement at qn. This model keeps that function: qn takes ~d at every
// rising clock edge. Like the circuit it has no reset; users clear it by
// forcing d. Being dynamic, the real circuit needs a minimum clock rate;
// this model does not.
module tspc_dff (
  input  logic clk,
  input  logic d,
  output logic qn
);
  always_ff @(posedge clk) qn <= ~d;
endmodule
