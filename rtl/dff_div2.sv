// Divide-by-2 built from two D latches with inverted feedback.
//
// The master latch is transparent while clk_in is high, the slave while
// clk_in is low, so the pair acts as a flip-flop that updates on the falling
// edge of clk_in. The inverted slave output is fed back to the master input,
// so the output toggles once per input period: half the input frequency.
// Both latch outputs are brought out: the master output m leads the slave
// output q by half an input period, a quarter of the output period, so
// {m, q, ~m, ~q} are four phases 90 degrees apart (m first). m changes at the
// rising edge of clk_in, q at the falling edge. rst_n clears both latches
// asynchronously (this design's addition, so the output phase is known).
// Lint tools see the feedback q -> master -> slave -> q as a combinational
// loop; it is broken by the two latches, which are never transparent at the
// same time, so it stands as in the circuit.
module dff_div2 (
  input  logic clk_in,
  input  logic rst_n,
  output logic m,      // master latch output (leads q by 90 degrees)
  output logic q       // slave latch output, the divided clock
);
  logic clk_n, q_n;

  assign clk_n = ~clk_in;

  d_latch u_master (.clk(clk_in), .rst_n(rst_n), .d(q_n), .q(m), .qn());
  d_latch u_slave  (.clk(clk_n),  .rst_n(rst_n), .d(m),   .q(q), .qn(q_n));
endmodule
