// Sign-magnitude coefficient multiplier.
//
// The multiplier of the filter works on unsigned numbers only, so a signed
// sample is first turned into its magnitude by an absolute-value stage and
// multiplied by the unsigned 4-bit coefficient. The 12-bit product keeps only
// its upper 8 bits, so the result is |x| * c / 16 truncated, which makes the
// coefficient a binary fraction 0.0000 to 0.1111 (0 to 0.9375). The sign of
// the sample is passed on beside the magnitude; the caller restores it with an
// add/subtract unit. Because the magnitude is truncated before the sign is put
// back, the product is rounded toward zero for either sign.
//
// Interface: x_i is the signed sample, coef_i the coefficient, mag_o the kept
// upper product bits (unsigned, at most 120 for x_i = -128 and coef_i = 15)
// and neg_o is high when x_i is negative. Purely combinational. The four
// low product bits are dropped on purpose (lint reports them as unused).
//
// The absolute-value stage, the unsigned multiplier and the choice of the
// upper 8 product bits follow the design; the split into a magnitude output
// and a sign output is this implementation's own.
module coef_mult
  import iir_pkg::*;
(
  input  sample_t               x_i,
  input  coef_t                 coef_i,
  output logic [SAMPLE_W-1:0]   mag_o,
  output logic                  neg_o
);

  logic [SAMPLE_W-1:0] abs_x;   // 0..128, unsigned
  logic [PROD_W-1:0]   prod;    // bX[11..0]

  always_comb begin
    neg_o = x_i[SAMPLE_W-1];
    abs_x = neg_o ? SAMPLE_W'(-x_i) : SAMPLE_W'(x_i);
    prod  = PROD_W'(abs_x) * PROD_W'(coef_i);
    mag_o = prod[PROD_W-1:COEF_W];
  end

endmodule
