// fp_ref_pkg: reference arithmetic for the floating-point testbenches.
//
// Values are decoded into double-precision reals and results are encoded back
// with the suite's rules: round toward zero, subnormals as zero, overflow to INF.
// Testbenches only use this where the double-precision result is exact, or
// where rounding it to nearest cannot cross a boundary of the narrower format.
// That holds for products, for sums of operands with nearby exponents,
// quotients and square roots. So the encoded value is the correctly truncated
// result. The format is given by the significand width mw and exponent width ew.
package fp_ref_pkg;

  function automatic int bias(int ew);
    return (1 << (ew - 1)) - 1;
  endfunction

  function automatic int emax(int ew);
    return (1 << ew) - 1;
  endfunction

  function automatic int fexp(logic [31:0] x, int mw, int ew);
    return int'((x >> mw) & ((1 << ew) - 1));
  endfunction

  function automatic logic [31:0] fman(logic [31:0] x, int mw);
    return x & ((32'd1 << mw) - 1);
  endfunction

  function automatic bit fsign(logic [31:0] x, int mw, int ew);
    return x[mw + ew];
  endfunction

  function automatic bit is_nan(logic [31:0] x, int mw, int ew);
    return fexp(x, mw, ew) == emax(ew) && fman(x, mw) != 0;
  endfunction

  function automatic bit is_inf(logic [31:0] x, int mw, int ew);
    return fexp(x, mw, ew) == emax(ew) && fman(x, mw) == 0;
  endfunction

  function automatic bit is_zero(logic [31:0] x, int mw, int ew);
    return fexp(x, mw, ew) == 0;
  endfunction

  // Finite value of a normal number (subnormals read as zero).
  function automatic real to_real(logic [31:0] x, int mw, int ew);
    real m;
    int  e;
    if (is_zero(x, mw, ew)) return 0.0;
    m = 1.0 + real'(fman(x, mw)) / real'(64'd1 << mw);
    e = fexp(x, mw, ew) - bias(ew);
    m = m * (2.0 ** e);
    return fsign(x, mw, ew) ? -m : m;
  endfunction

  function automatic logic [31:0] make(bit s, int e, logic [31:0] m, int mw, int ew);
    return (32'(s) << (mw + ew)) | (32'(e) << mw) | (m & ((32'd1 << mw) - 1));
  endfunction

  function automatic logic [31:0] inf(bit s, int mw, int ew);
    return make(s, emax(ew), 0, mw, ew);
  endfunction

  // Encode a real with truncation toward zero.
  function automatic logic [31:0] from_real(real v, int mw, int ew, bit zsign = 0);
    logic [63:0] b;
    int          eu;
    bit          s;
    logic [51:0] f;
    if (v == 0.0) return make(zsign, 0, 0, mw, ew);
    b  = $realtobits(v);
    s  = b[63];
    eu = int'(b[62:52]) - 1023;
    f  = b[51:0];
    if (eu > bias(ew))     return inf(s, mw, ew);
    if (eu < 1 - bias(ew)) return make(s, 0, 0, mw, ew);
    return make(s, eu + bias(ew), 32'(f >> (52 - mw)), mw, ew);
  endfunction

  // Random normal number with unbiased exponent in [elo, ehi].
  function automatic logic [31:0] rnd(int elo, int ehi, int mw, int ew);
    int e;
    e = elo + int'($urandom % 32'(ehi - elo + 1));
    return make(1'($urandom), e + bias(ew), $urandom, mw, ew);
  endfunction

  // Distance in units of the last place between two finite same-sign values.
  function automatic int ulp_diff(logic [31:0] a, logic [31:0] b, int mw, int ew);
    int d;
    d = int'(a & ((32'd1 << (mw + ew)) - 1)) - int'(b & ((32'd1 << (mw + ew)) - 1));
    if (fsign(a, mw, ew) != fsign(b, mw, ew)) return 1 << 30;
    return d < 0 ? -d : d;
  endfunction

endpackage
