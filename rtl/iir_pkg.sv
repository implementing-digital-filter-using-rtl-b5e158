// Shared widths and types of the first-order IIR filter.
//
// Every signal sample in the filter (input X, zeros-section output K, filter
// output O) is an 8-bit two's-complement word, and each coefficient is a
// 4-bit unsigned fraction 0.0000 to 0.1111 in binary (0 to 15/16). The
// product of an 8-bit magnitude and a 4-bit coefficient is 12 bits wide, and
// only its upper 8 bits (bits 11..4) are kept, which divides by 16 and places
// the binary point in front of the coefficient. These widths follow the
// design; the package and type names are this implementation's own.
package iir_pkg;

  localparam int unsigned SAMPLE_W = 8;   // X[7..0], K[7..0], O[7..0]
  localparam int unsigned COEF_W   = 4;   // b[3..0] and a[3..0]
  localparam int unsigned PROD_W   = SAMPLE_W + COEF_W;  // bX[11..0]

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [COEF_W-1:0]   coef_t;

  // Operation of an add/subtract unit: ADD gives dataa + datab and SUB gives
  // dataa - datab. The control pin is high for ADD.
  typedef enum logic {
    OP_SUB = 1'b0,
    OP_ADD = 1'b1
  } addsub_op_e;

endpackage
