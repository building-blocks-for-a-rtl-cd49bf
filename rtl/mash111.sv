// MASH 1-1-1 (third-order, multi-stage noise-shaping) sigma-delta modulator.
//
// Three first-order stages in cascade: the first integrates the fraction F,
// each later one integrates the residue (minus the quantization error) of
// the stage before. The stage outputs are combined through
//   N1 = z^-2 Q1,  N2 = z^-1 (1 - z^-1) Q2,  N3 = (1 - z^-1)^2 Q3
// so that the errors of stages 1 and 2 cancel exactly and
//   N_offset = z^-3 F + (1 - z^-1)^3 E3.
// The average of N_offset equals F / 2^FRAC_W. Its range is -3..+4, so the
// output is OFFSET_W = 4 bits signed. One sample per rising edge of clk
// (the divider output, which runs at the reference rate when locked). All
// registers are cleared by the synchronous clr. N_offset is a combinational
// function of registers and stable from one clock edge to the next.
module mash111
  import wbpll_pkg::*;
#(
  parameter int unsigned FRAC_BITS = FRAC_W,
  parameter int unsigned OFS_W     = OFFSET_W
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic [FRAC_BITS-1:0]    f,
  output logic signed [OFS_W-1:0] n_offset
);
  logic                 q1, q2, q3;
  logic [FRAC_BITS-1:0] e1, e2;
  logic                 q1_d1, q1_d2, q2_d1, q2_d2, q3_d1, q3_d2;

  sd_stage1 #(.FRAC_W(FRAC_BITS)) u_st1 (.clk(clk), .clr(clr), .x(f),  .q(q1), .err(e1));
  sd_stage1 #(.FRAC_W(FRAC_BITS)) u_st2 (.clk(clk), .clr(clr), .x(e1), .q(q2), .err(e2));
  sd_stage1 #(.FRAC_W(FRAC_BITS)) u_st3 (.clk(clk), .clr(clr), .x(e2), .q(q3), .err());

  always_ff @(posedge clk) begin
    if (clr) begin
      {q1_d1, q1_d2, q2_d1, q2_d2, q3_d1, q3_d2} <= '0;
    end else begin
      q1_d1 <= q1;  q1_d2 <= q1_d1;
      q2_d1 <= q2;  q2_d2 <= q2_d1;
      q3_d1 <= q3;  q3_d2 <= q3_d1;
    end
  end

  // N1 + N2 + N3 in OFS_W-bit two's complement.
  always_comb begin
    n_offset = OFS_W'(q1_d2)
             + OFS_W'(q2_d1) - OFS_W'(q2_d2)
             + OFS_W'(q3) - OFS_W'({q3_d1, 1'b0}) + OFS_W'(q3_d2);
  end
endmodule
