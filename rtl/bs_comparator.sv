// Comparator of the band-search loop.
//
// Combinational. The counter measures pulses of the f_vco / DIV_RATIO signal
// in half a reference period, so count * 2 * DIV_RATIO estimates
// f_vco / f_ref, the quantity the integer part of N_desired asks for. The
// count is scaled by a shift (2 * DIV_RATIO = 2^SHIFT) and compared with the
// integer part of N_desired. too_low = 1 means the measured band sits below
// the requested frequency. The scaling is this design's choice; the source
// design compares the count with N_desired without saying how the two are
// brought to the same scale.
module bs_comparator #(
  parameter int unsigned CNT_W   = 5,
  parameter int unsigned NINT_W  = 7,
  parameter int unsigned SHIFT   = 2
) (
  input  logic [CNT_W-1:0]  count,
  input  logic [NINT_W-1:0] n_int,
  output logic              too_low
);
  localparam int unsigned W = CNT_W + SHIFT + 1;
  logic [W-1:0] scaled;

  assign scaled  = W'(count) << SHIFT;
  assign too_low = scaled < W'(n_int);
endmodule
