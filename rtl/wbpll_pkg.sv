// Shared constants and types of the wide-band fractional-N PLL digital core.
//
// Word formats of the fractional-N path follow the frequency plan of the
// design: a 40 MHz reference, a VCO range of roughly 1.1-2.7 GHz, a fixed
// divide-by-8 with quadrature outputs and a dual-modulus phase-select
// prescaler with P = 4. The requested modulus N_desired is an unsigned
// fixed-point word with 7 integer and 19 fractional bits; halving it only
// moves the binary point, giving a 6-bit integer part N_I and a 20-bit
// fraction F. The band code of the VCO is 5 bits (32 sub-bands).
package wbpll_pkg;

  // Fractional-N word formats.
  localparam int unsigned FRAC_W   = 20;              // bits of F
  localparam int unsigned NI_W     = 6;               // bits of N_I and N_d
  localparam int unsigned NDES_W   = NI_W + FRAC_W;   // bits of N_desired (7.19)
  localparam int unsigned NA_W     = 2;               // A = 2 LSB of N_d
  localparam int unsigned NB_W     = 4;               // B = 4 MSB of N_d
  localparam int unsigned OFFSET_W = 4;               // signed MASH output, -3..+4


  // VCO band code.
  localparam int unsigned BAND_W   = 5;

  // States of the band-search controller.
  typedef enum logic [1:0] {
    BS_LOCK  = 2'd0,   // normal analog loop closed, band frozen
    BS_FIRST = 2'd1,   // measuring band 0
    BS_STEP  = 2'd2    // measuring band k > 0
  } bs_state_t;

endpackage
