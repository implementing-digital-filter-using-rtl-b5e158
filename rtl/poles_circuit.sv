// Poles section of the first-order IIR filter: Y(n) = K(n) +/- a*Y(n-1).
//
// The sum Y(n) is formed combinationally by an add/subtract unit from the
// zeros-section output K(n) and the feedback product, and an 8-bit output
// register captures it each clock. The filter output o_o is taken from that
// register rather than from the adder, so adder glitches never reach the
// output, and the same register supplies Y(n-1) for the feedback. The
// multiplier is unsigned, so the magnitude of Y(n-1) is multiplied by a
// (coef_mult, a/16 truncated) and the sign is handled by the add/subtract
// control alone: the unit adds when the sign of Y(n-1) and the coefficient
// sign agree and subtracts otherwise. as2_i = 1 gives a positive coefficient
// (pole at z = +a, low pass); as2_i = 0 a negative one (pole at z = -a).
//
// Interface: k_i (8-bit signed), a_i (4-bit coefficient, a_i/16), as2_i
// (coefficient sign, 1 = positive), o_o (8-bit signed output, the register).
// One sample per clock: o_o shows Y(n) after the rising edge that follows
// K(n), i.e. one clock of latency from k_i. Sums wrap modulo 2^8.
//
// The adder, the output register named as the filter output, the absolute
// value ahead of the multiplier, the upper 8 product bits and the AS2 control
// follow the design. Deriving the add/subtract control as
// AS2 XOR sign(Y(n-1)), the asynchronous active-low reset and the rising
// edge are this implementation's choices.
module poles_circuit
  import iir_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t k_i,
  input  coef_t   a_i,
  input  logic    as2_i,
  output sample_t o_o
);

  logic [SAMPLE_W-1:0] mag;
  logic                neg;
  addsub_op_e          fb_op;
  sample_t             y;

  coef_mult u_mult (
    .x_i    (o_o),
    .coef_i (a_i),
    .mag_o  (mag),
    .neg_o  (neg)
  );

  always_comb begin
    fb_op = addsub_op_e'(as2_i ^ neg);
    y     = (fb_op == OP_ADD) ? sample_t'(k_i + mag) : sample_t'(k_i - mag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) o_o <= '0;
    else        o_o <= y;
  end

endmodule
