// One-bit mirror full adder with inverted outputs.
//
// The mirror adder is the static CMOS adder whose pull-up and pull-down
// networks are mirror images; it produces the complements of carry and sum
// (con, sn) in a single stage, and the sum stage reuses the inverted carry.
// This model gives the same logic function: con = ~majority(a, b, ci) and
// sn = ~(a ^ b ^ ci), with sn formed from con as in the circuit:
// sn = ~((a | b | ci) & con | (a & b & ci)). Combinational.
module mirror_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic con,   // inverted carry out
  output logic sn     // inverted sum
);
  assign con = ~((a & b) | (ci & (a | b)));
  assign sn  = ~(((a | b | ci) & con) | (a & b & ci));
endmodule
