// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// The filter datapath needs one of these for every coefficient tap. The
// 24-bit significands (hidden one restored) are multiplied into a 48-bit
// product; the exponents are added and re-biased. The product is normalised
// by at most one position, then rounded to nearest-even using a guard bit
// and a sticky bit. A carry out of rounding bumps the exponent again.
//
// Special values: NaN in, or infinity times zero, gives the quiet NaN
// 0x7FC00000; infinity times a finite nonzero value gives a signed infinity;
// a zero operand gives a signed zero. Subnormal operands count as zero, and a
// result below the smallest normal number is flushed to a signed zero; a
// result above the largest finite number becomes a signed infinity.
//
// Interface: a, b and y are binary32 words. Timing: purely combinational;
// the enclosing design registers the result.
//
// The use of a binary32 multiplier follows the filter's description; the
// internal organisation, rounding mode and flush-to-zero handling are this
// design's own choices.
module fp_mul
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  fp32_t     fa, fb, res;
  fp_class_e ca, cb;
  logic        s;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic [24:0] mant_r;
  logic        guard, sticky, round_up;
  logic signed [10:0] e;

  always_comb begin
    fa = fp32_t'(a);
    fb = fp32_t'(b);
    ca = fp_classify(fa.exp, fa.frac);
    cb = fp_classify(fb.exp, fb.frac);
    s  = fa.sign ^ fb.sign;

    ma   = {1'b1, fa.frac};
    mb   = {1'b1, fb.frac};
    prod = ma * mb;
    e    = 11'(signed'({3'b000, fa.exp})) + 11'(signed'({3'b000, fb.exp})) - 11'(BIAS);

    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e      = e + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end

    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e      = e + 11'sd1;
    end

    if (e >= 11'sd255)     res = fp_inf(s);
    else if (e <= 11'sd0)  res = fp_zero(s);
    else                   res = '{sign: s, exp: e[7:0], frac: mant_r[22:0]};

    if (ca == FP_NAN || cb == FP_NAN ||
        (ca == FP_INF && cb == FP_ZERO) || (ca == FP_ZERO && cb == FP_INF))
      y = QNAN;
    else if (ca == FP_INF || cb == FP_INF)
      y = fp_inf(s);
    else if (ca == FP_ZERO || cb == FP_ZERO)
      y = fp_zero(s);
    else
      y = res;
  end

endmodule
