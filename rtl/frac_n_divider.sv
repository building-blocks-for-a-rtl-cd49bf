// Fractional-N divider: MASH 1-1-1 modulator driving the programmable divider.
//
// N_desired (7 integer + 19 fractional bits) is the requested ratio
// f_vco / f_ref. A fixed divide-by-2 ahead of the programmable part means
// the programmable part must average N_desired / 2; halving only moves the
// binary point, so the same 26 bits are read as a 6-bit integer N_I and a
// 20-bit fraction F. The modulator turns F into a signed integer offset per
// divider cycle, N_d = N_I + N_offset, and N_d is split into A = N_d[1:0] and
// B = N_d[5:2], so that each output period is 2*(A + 4*B) = 2*N_d VCO
// periods and the long-run average is exactly N_desired.
// The modulator is clocked by the divider output (at the reference rate once
// locked), one new N_d per output period; the accumulator picks A and B up at
// the end of the period, so N_d is settled several prescaler cycles before.
// Clocking the modulator from the divider output is this design's choice.
// The modulator's clear is released two divider cycles after rst_n.
module frac_n_divider
  import wbpll_pkg::*;
(
  input  logic               rst_n,
  input  logic [3:0]         ph,         // quadrature outputs of the divide-by-8
  input  logic [NDES_W-1:0]  n_desired,  // 7.19 unsigned
  output logic               fout,       // divider output, to the PFD
  output logic [NA_W-1:0]    n_a,
  output logic [NB_W-1:0]    n_b,
  output logic signed [OFFSET_W-1:0] n_offset,
  output logic               mode        // prescaler mode, for observation
);
  logic [NI_W-1:0]   n_i;
  logic [FRAC_W-1:0] f;
  logic [NI_W-1:0]   n_d;
  logic [1:0]        clr_sync;
  logic              clr;

  // Halving N_desired: same bits, binary point one place to the left.
  assign n_i = n_desired[NDES_W-1 -: NI_W];
  assign f   = n_desired[FRAC_W-1:0];

  // Reset synchroniser into the divider-output domain.
  always_ff @(posedge fout or negedge rst_n) begin
    if (!rst_n) clr_sync <= 2'b11;
    else        clr_sync <= {clr_sync[0], 1'b0};
  end
  assign clr = clr_sync[1];

  mash111 u_mash (.clk(fout), .clr(clr), .f(f), .n_offset(n_offset));

  assign n_d = n_i + NI_W'(n_offset);   // offset sign-extended, modulo 2^6
  assign n_a = n_d[NA_W-1:0];
  assign n_b = n_d[NI_W-1 -: NB_W];

  prog_divider #(.A_W(NA_W), .B_W(NB_W)) u_div (
    .ph       (ph),
    .rst_n    (rst_n),
    .a_in     (n_a),
    .b_in     (n_b),
    .fout     (fout),
    .presc_out(),
    .mode     (mode)
  );
endmodule
