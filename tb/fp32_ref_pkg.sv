// fp32_ref_pkg: reference model for binary32 arithmetic, used by the
// testbenches only. Operands are widened to double precision, the operation
// is done in double precision, and the result is rounded back to binary32
// with round-to-nearest-even. Because double has more than 2*24+2
// significand bits, this double rounding gives the correctly rounded
// binary32 sum or product. Like the hardware, subnormal inputs are read as
// zero and results whose exponent (after rounding) is below the normal range
// are flushed to a signed zero.
package fp32_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0)
      d = {f[31], 63'd0};
    else if (f[30:23] == 8'hFF)
      d = {f[31], 11'h7FF, f[22:0], 29'd0};
    else
      d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real v);
    logic [63:0] d;
    logic        s;
    logic [10:0] ed;
    logic [52:0] m;
    logic [24:0] mr;
    logic        g, st;
    int          e;
    d  = $realtobits(v);
    s  = d[63];
    ed = d[62:52];
    if (ed == 11'd0) return {s, 31'd0};
    if (ed == 11'h7FF) return (d[51:0] == 0) ? {s, 8'hFF, 23'd0} : 32'h7FC0_0000;
    m  = {1'b1, d[51:0]};
    e  = int'(ed) - 1023 + 127;
    g  = m[28];
    st = |m[27:0];
    mr = {1'b0, m[52:29]} + {24'd0, g & (st | m[29])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // Random normal binary32 number with exponent field in [emin, emax].
  function automatic logic [31:0] rand_fp(int emin, int emax);
    logic [7:0] ex;
    ex = 8'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), ex, 23'($urandom)};
  endfunction

endpackage
