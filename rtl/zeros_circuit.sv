// Zeros section of the first-order IIR filter: K(n) = b*X(n) +/- b*X(n-1).
//
// Both feed-forward coefficients share one value b (b0 = b1 = b), so a single
// multiplier serves both taps: the product b*X(n) is formed once and a
// register delays that product to give b*X(n-1). The multiplier is unsigned,
// so the sample's magnitude is multiplied (coef_mult) and a first
// add/subtract unit computes 0 + product for a positive sample or
// 0 - product for a negative one. A second add/subtract unit adds or
// subtracts the delayed product under control of as_i: as_i = 1 puts the
// zero at z = -1 (low pass), as_i = 0 puts it at z = +1 (high pass).
//
// Interface: x_i (8-bit signed sample), b_i (4-bit coefficient, b_i/16),
// as_i (1 = add, 0 = subtract), k_o (8-bit signed output). One sample per
// clock; k_o is combinational from x_i and the product register, which loads
// on the rising clock edge. Sums wrap modulo 2^8, as an 8-bit adder does;
// with samples of magnitude 63 as used in the design's tests the sum cannot
// overflow.
//
// The structure (absolute value, multiplier, upper 8 product bits, sign
// restore by 0 +/- product, delay of the product, AS-controlled second
// adder) follows the design. The asynchronous active-low reset of the delay
// register and the rising clock edge are this implementation's choices.
module zeros_circuit
  import iir_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_i,
  input  coef_t   b_i,
  input  logic    as_i,
  output sample_t k_o
);

  logic [SAMPLE_W-1:0] mag;
  logic                neg;
  addsub_op_e          sign_op;
  sample_t             bx;        // signed b*X(n)
  sample_t             bx_d;      // signed b*X(n-1)
  addsub_op_e          tap_op;

  coef_mult u_mult (
    .x_i    (x_i),
    .coef_i (b_i),
    .mag_o  (mag),
    .neg_o  (neg)
  );

  // First add/subtract unit: 0 +/- magnitude restores the sign.
  always_comb begin
    sign_op = neg ? OP_SUB : OP_ADD;
    bx      = (sign_op == OP_ADD) ? sample_t'(8'sd0 + mag) : sample_t'(8'sd0 - mag);
  end

  // Delay register holding the previous signed product.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bx_d <= '0;
    else        bx_d <= bx;
  end

  // Second add/subtract unit: present product +/- delayed product.
  always_comb begin
    tap_op = addsub_op_e'(as_i);
    k_o    = (tap_op == OP_ADD) ? sample_t'(bx + bx_d) : sample_t'(bx - bx_d);
  end

endmodule
