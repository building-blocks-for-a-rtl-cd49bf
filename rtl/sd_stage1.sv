// First-order sigma-delta stage of the MASH 1-1-1 modulator.
//
// An accumulator of FRAC_W fractional bits followed by an integer quantizer.
// Each clock the register takes x + frac(v): the input plus the residue left
// after the quantizer removed the integer part of the previous value. The
// quantizer output q is the integer part of the register (its carry bit,
// 0 or 1) and err is the fractional part, which equals minus the
// quantization error and feeds the next stage. In the z domain
// Q = z^-1 X + (1 - z^-1) E.
// The adder is a ripple chain of mirror full adders and the register is made
// of TSPC flip-flops, the two cells the modulator is built from; both have
// inverted outputs, which this model re-inverts. clr is a synchronous clear
// (the flip-flops have no reset), this design's choice.
module sd_stage1 #(
  parameter int unsigned FRAC_W = 20
) (
  input  logic              clk,
  input  logic              clr,
  input  logic [FRAC_W-1:0] x,
  output logic              q,     // quantizer output, 0 or 1
  output logic [FRAC_W-1:0] err    // fractional part = minus quantization error
);
  logic [FRAC_W:0]   v;        // register: carry bit and fraction
  logic [FRAC_W:0]   sum;      // x + err, FRAC_W+1 bits
  logic [FRAC_W:0]   carry;
  logic [FRAC_W-1:0] con, sn;
  logic [FRAC_W:0]   vn;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < FRAC_W; i++) begin : g_add
    mirror_full_adder u_fa (
      .a  (x[i]),
      .b  (v[i]),
      .ci (carry[i]),
      .con(con[i]),
      .sn (sn[i])
    );
    assign carry[i+1] = ~con[i];
    assign sum[i]     = ~sn[i];
  end
  assign sum[FRAC_W] = carry[FRAC_W];

  for (genvar i = 0; i <= FRAC_W; i++) begin : g_reg
    tspc_dff u_ff (.clk(clk), .d(sum[i] & ~clr), .qn(vn[i]));
    assign v[i] = ~vn[i];
  end

  assign q   = v[FRAC_W];
  assign err = v[FRAC_W-1:0];
endmodule
