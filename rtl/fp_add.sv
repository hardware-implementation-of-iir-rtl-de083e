// fp_add: combinational IEEE-754 single-precision adder.
//
// Used for every summing node of the filter. The operands are ordered so
// that the larger magnitude comes first. The smaller significand is shifted
// right by the exponent difference into a 27-bit field (24 significand bits
// plus guard, round and sticky), where every bit shifted past the end is
// ORed into the sticky bit. The significands are then added, or subtracted
// when the signs differ. A carry out shifts the sum right by one; otherwise
// leading zeros are counted and shifted out to the left. Guard, round and
// sticky bits are enough for exact round-to-nearest-even: a left shift of
// more than one place only happens when the exponents differ by at most one,
// in which case nothing has been shifted out.
//
// Special values: any NaN, or infinities of opposite sign, give the quiet NaN
// 0x7FC00000; an infinity otherwise wins; an exact zero sum is +0, and
// (-0) + (-0) is -0. Subnormal operands count as zero and a result below the
// smallest normal number is flushed to a signed zero; overflow gives a signed
// infinity.
//
// Interface: a, b and y are binary32 words, y = a + b. Timing: purely
// combinational.
//
// The use of a binary32 adder follows the filter's description; the internal
// organisation, rounding mode and flush-to-zero handling are this design's
// own choices.
module fp_add
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  fp32_t     fa, fb, op_hi, op_lo, res;
  fp_class_e ca, cb;
  logic [7:0]  d;
  logic [26:0] mb_ext, shifted, lost_mask;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic        found;
  logic [24:0] mant_r;
  logic        guard, sticky, round_up;
  logic signed [10:0] e;

  always_comb begin
    fa = fp32_t'(a);
    fb = fp32_t'(b);
    ca = fp_classify(fa.exp, fa.frac);
    cb = fp_classify(fb.exp, fb.frac);

    // Order by magnitude.
    if ({fa.exp, fa.frac} >= {fb.exp, fb.frac}) begin
      op_hi = fa; op_lo = fb;
    end else begin
      op_hi = fb; op_lo = fa;
    end
    d = op_hi.exp - op_lo.exp;

    // Align the smaller significand, collecting a sticky bit.
    mb_ext    = {1'b1, op_lo.frac, 3'b000};
    lost_mask = '0;
    if (d >= 8'd27) begin
      shifted = 27'd1;
    end else begin
      lost_mask = (27'd1 << d) - 27'd1;
      shifted   = mb_ext >> d;
      shifted[0] = shifted[0] | (|(mb_ext & lost_mask));
    end

    if (op_hi.sign == op_lo.sign)
      sum = {1'b0, 1'b1, op_hi.frac, 3'b000} + {1'b0, shifted};
    else
      sum = {1'b0, 1'b1, op_hi.frac, 3'b000} - {1'b0, shifted};

    e = 11'(signed'({3'b000, op_hi.exp}));

    // Normalise.
    lz    = '0;
    found = 1'b0;
    norm  = '0;
    if (sum[27]) begin
      norm = {sum[27:2], sum[1] | sum[0]};
      e    = e + 11'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      norm = sum[26:0] << lz;
      e    = e - 11'(lz);
    end

    // Round to nearest, ties to even.
    guard    = norm[2];
    sticky   = norm[1] | norm[0];
    round_up = guard & (sticky | norm[3]);
    mant_r   = {1'b0, norm[26:3]} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e      = e + 11'sd1;
    end

    if (sum == 28'd0)      res = fp_zero(1'b0);
    else if (e >= 11'sd255) res = fp_inf(op_hi.sign);
    else if (e <= 11'sd0)  res = fp_zero(op_hi.sign);
    else                   res = '{sign: op_hi.sign, exp: e[7:0], frac: mant_r[22:0]};

    if (ca == FP_NAN || cb == FP_NAN || (ca == FP_INF && cb == FP_INF && fa.sign != fb.sign))
      y = QNAN;
    else if (ca == FP_INF)
      y = fa;
    else if (cb == FP_INF)
      y = fb;
    else if (ca == FP_ZERO && cb == FP_ZERO)
      y = fp_zero(fa.sign & fb.sign);
    else if (ca == FP_ZERO)
      y = fb;
    else if (cb == FP_ZERO)
      y = fa;
    else
      y = res;
  end

endmodule
