// First-order IIR digital filter H(z) = b (1 + z^-1) / (1 - a z^-1), built
// as a zeros section followed by a poles section.
//
// The zeros section forms K(n) = b*X(n) +/- b*X(n-1) and the poles section
// Y(n) = K(n) +/- a*Y(n-1), registered into the output O. Both coefficients
// are 4-bit binary fractions (0 to 15/16) applied as inputs, so the filter
// type and cutoff are changed without rebuilding the logic: as = 1 places
// the zero at z = -1, as = 0 at z = +1; as2 = 1 places the pole at z = +a/16,
// as2 = 0 at z = -a/16. All samples are 8-bit two's complement.
//
// Interface: x (input sample), b, as (zeros section), a, as2 (poles
// section), k (zeros-section output, brought out so it can be observed on
// its own, as the two sections are kept apart in the design), o (filter
// output). One input sample is taken and one output sample produced per
// clock; o carries the response to x(n) after the rising edge at the end of
// the clock in which x(n) is applied.
//
// The decomposition into two sections, the widths and the output register
// follow the design. Reset and clock edge are this implementation's
// choices.
module iir1_filter
  import iir_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,
  input  coef_t   b,
  input  logic    as,
  input  coef_t   a,
  input  logic    as2,
  output sample_t k,
  output sample_t o
);

  zeros_circuit u_zeros (
    .clk   (clk),
    .rst_n (rst_n),
    .x_i   (x),
    .b_i   (b),
    .as_i  (as),
    .k_o   (k)
  );

  poles_circuit u_poles (
    .clk   (clk),
    .rst_n (rst_n),
    .k_i   (k),
    .a_i   (a),
    .as2_i (as2),
    .o_o   (o)
  );

endmodule
