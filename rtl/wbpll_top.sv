// Digital core of a wide-band, double-loop sigma-delta fractional-N PLL.
//
// The VCO output (1.1-2.7 GHz) enters a latch-based divide-by-8 that also
// supplies four quadrature phases. Two loop switches route these phases:
//  - S2 closes the normal loop: the phases feed the fractional-N divider
//    (phase-select 1/1.25 prescaler, A/B accumulator, MASH 1-1-1 modulator),
//    whose output fdiv goes to the phase-frequency detector. Its average
//    ratio, counted in VCO periods, is N_desired.
//  - S3 closes the band-search loop: one phase feeds the band-search
//    counter (fed from the first divide-by-2 stage, f_vco/2), which picks
//    the VCO sub-band before analog locking.
// S1 (tuning node to V_min rather than the loop filter), the 5-bit band code
// and fdiv are the connections to the analog parts (VCO, PFD/charge pump,
// loop filter, tuning switch), which lie outside this core. The switches are
// modelled as AND gates on the digital signals. ref_clk is the 40 MHz
// reference; rst_n is an asynchronous active-low reset that also starts a
// band search. A change of the integer part of n_desired restarts the search.
// While the normal loop is open the fractional-N divider is held in reset,
// so the modulator restarts clean when the loop closes (this design's
// choice). n_desired must lie in 24..70; with a fraction, the integer part
// of N_desired/2 must be at least 15, so that N_I + N_offset keeps A <= B.
module wbpll_top
  import wbpll_pkg::*;
(
  input  logic                       vco_clk,
  input  logic                       ref_clk,
  input  logic                       rst_n,
  input  logic [NDES_W-1:0]          n_desired,   // 7.19 unsigned f_vco/f_ref
  output logic                       fdiv,        // to the PFD
  output logic [BAND_W-1:0]          band,        // VCO band code
  output logic                       s1_vmin,     // 1: VCO tuning node on V_min
  output logic                       s2_normal,   // 1: normal loop closed
  output logic                       s3_search,   // 1: band-search loop closed
  output logic                       bs_done,     // end-of-search pulse
  output logic [NA_W-1:0]            n_a,
  output logic [NB_W-1:0]            n_b,
  output logic signed [OFFSET_W-1:0] n_offset,
  output logic                       presc_mode
);
  logic [3:0] ph;
  logic [3:0] ph_normal;
  logic       ph_search;
  logic       div2;
  logic       fracn_rst_n;

  hf_div8 u_div8 (.vco_clk(vco_clk), .rst_n(rst_n), .div2(div2), .ph(ph));

  // Loop switches S2 and S3.
  assign ph_normal = ph & {4{s2_normal}};
  assign ph_search = div2 & s3_search;

  // The fractional-N divider is held in reset while the normal loop is open,
  // so it restarts from a clean state (modulator cleared) when S2 closes.
  assign fracn_rst_n = rst_n & s2_normal;

  frac_n_divider u_fracn (
    .rst_n    (fracn_rst_n),
    .ph       (ph_normal),
    .n_desired(n_desired),
    .fout     (fdiv),
    .n_a      (n_a),
    .n_b      (n_b),
    .n_offset (n_offset),
    .mode     (presc_mode)
  );

  band_search #(
    .BAND_BITS(BAND_W),
    .NINT_W   (NDES_W - FRAC_W + 1),
    .SHIFT    (2)
  ) u_bs (
    .ref_clk(ref_clk),
    .rst_n  (rst_n),
    .div_in (ph_search),
    .n_int  (n_desired[NDES_W-1 -: (NDES_W - FRAC_W + 1)]),
    .band   (band),
    .s1     (s1_vmin),
    .s2     (s2_normal),
    .s3     (s3_search),
    .done   (bs_done),
    .hold   (),
    .count  ()
  );
endmodule
