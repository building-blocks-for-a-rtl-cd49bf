// Programmable divider: phase-select prescaler followed by the A/B accumulator.
//
// Takes the four quadrature phases of the divide-by-8 and divides them by
// A + P*B with P = 4 prescaler cycles counted in units of a quarter
// divide-by-8 period; measured at the VCO this is N_div = 2*(A + 4*B).
// For A in 0..3 and B in 3..8 this covers 24..70 in steps of 2. The
// accumulator drives the prescaler mode, the prescaler clocks the
// accumulator; A and B are taken at the start of each output period.
module prog_divider #(
  parameter int unsigned A_W = 2,
  parameter int unsigned B_W = 4
) (
  input  logic [3:0]     ph,
  input  logic           rst_n,
  input  logic [A_W-1:0] a_in,
  input  logic [B_W-1:0] b_in,
  output logic           fout,
  output logic           presc_out,
  output logic           mode
);
  prescaler_1_125 u_presc (.ph(ph), .rst_n(rst_n), .mode(mode), .clk_out(presc_out));

  pd_accumulator #(.A_W(A_W), .B_W(B_W)) u_acc (
    .clk   (presc_out),
    .rst_n (rst_n),
    .a_in  (a_in),
    .b_in  (b_in),
    .mode  (mode),
    .fout  (fout),
    .reload()
  );
endmodule
