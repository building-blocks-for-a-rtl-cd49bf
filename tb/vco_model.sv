// Behavioural model of the multi-band LC VCO, for testbenches only.
//
// Not synthesizable: it generates a clock with delays. The VCO has 32
// sub-bands selected by a 5-bit code. With the tuning node on V_min
// (s1_vmin = 1) band k oscillates at its lowest frequency
//   f_k = F0_KHZ + k * DF_KHZ,
// defaults 1.14 GHz + k * 41.5625 MHz, so the band starts span the
// 1.14-2.47 GHz range of the oscillator. With the tuning node on the loop
// filter (s1_vmin = 0) the analog loop is assumed to have settled and the
// model runs at f_lock_khz, which the testbench sets.
module vco_model #(
  parameter int unsigned F0_KHZ = 1140000,
  parameter int unsigned DF_KHZ = 41562
) (
  input  logic [4:0]  band,
  input  logic        s1_vmin,
  input  int unsigned f_lock_khz,
  output logic        clk
);
  int unsigned f_khz;
  int unsigned half_ps;

  initial clk = 1'b0;

  always begin
    f_khz   = s1_vmin ? (F0_KHZ + int'(band) * DF_KHZ) : f_lock_khz;
    half_ps = 500000000 / f_khz;
    #(half_ps) clk = ~clk;
  end
endmodule
