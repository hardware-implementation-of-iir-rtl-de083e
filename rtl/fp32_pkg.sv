// fp32_pkg: shared types and constants for IEEE-754 single-precision
// (binary32) arithmetic used by the floating-point adder, multiplier and the
// notch filter datapath.
//
// A binary32 word is 1 sign bit, an 8-bit biased exponent (bias 127) and a
// 23-bit fraction with a hidden leading one. The operators in this design
// use round-to-nearest-even and treat subnormal numbers as zero on input
// and output (flush-to-zero); that simplification is this design's choice.
package fp32_pkg;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_t;

  localparam logic [7:0]  EXP_MAX  = 8'hFF;
  localparam int          BIAS     = 127;
  localparam logic [31:0] QNAN     = 32'h7FC0_0000;

  // Operand classes seen by the arithmetic units.
  typedef enum logic [1:0] {
    FP_ZERO = 2'd0,   // zero or subnormal (flushed)
    FP_NORM = 2'd1,
    FP_INF  = 2'd2,
    FP_NAN  = 2'd3
  } fp_class_e;

  function automatic fp_class_e fp_classify(logic [7:0] exp, logic [22:0] frac);
    if (exp == 8'd0)          return FP_ZERO;
    else if (exp != EXP_MAX)  return FP_NORM;
    else if (frac == 23'd0)   return FP_INF;
    else                      return FP_NAN;
  endfunction

  function automatic fp32_t fp_inf(logic s);
    return '{sign: s, exp: EXP_MAX, frac: 23'd0};
  endfunction

  function automatic fp32_t fp_zero(logic s);
    return '{sign: s, exp: 8'd0, frac: 23'd0};
  endfunction

endpackage
