// fp_add_core: combinational floating-point adder-subtractor, result = a +/- b.
//
// Format: sign, EW-bit biased exponent, MW-bit significand (IEEE-754 layout).
// Arithmetic follows the OpenCL embedded profile, as the units of this suite
// do. Rounding is toward zero. Subnormal inputs are read as zero and subnormal
// results are flushed to zero. INF and NaN are still produced and propagated
// (a NaN result is the quiet NaN with only the top significand bit set).
// Overflow gives INF. That is this design's reading of "all operations should
// properly generate and preserve INFs and NaNs".
// How it works: the operand of larger magnitude is always taken as the minuend.
// The two are swapped after a full magnitude compare, so the significand
// difference is never negative. This follows the described adder, which needs
// no two's-complement negation. The smaller operand is aligned with three guard
// bits and a sticky bit. Then comes the add or subtract, then leading-zero
// normalization, then truncation.
module fp_add_core #(
  parameter int unsigned MW = 23,
  parameter int unsigned EW = 8
) (
  input  logic [MW+EW:0] a,
  input  logic [MW+EW:0] b,
  input  logic           sub,
  output logic [MW+EW:0] y
);
  localparam int unsigned W    = MW + EW + 1;
  localparam logic [EW-1:0] EMAX = '1;
  localparam int unsigned FW   = MW + 4;          // 1.f plus 3 guard bits
  localparam int unsigned SW   = $clog2(FW + 2);

  logic          sa, sb, ax_zero, bx_zero, a_inf, b_inf, a_nan, b_nan;
  logic [EW-1:0] ea, eb;
  logic          swap;
  logic          sx, sy;
  logic [EW-1:0] ex, ey;
  logic [MW-1:0] mx, my;
  logic [EW-1:0] d;
  logic [FW-1:0] xf, yf, ys;
  logic          sticky;
  logic [FW:0]   sum;
  logic          eff_sub;
  logic [SW-1:0] lz;
  logic [FW:0]   norm;
  logic signed [EW+1:0] er;

  always_comb begin
    sa = a[W-1];
    sb = b[W-1] ^ sub;
    ea = a[W-2:MW];
    eb = b[W-2:MW];
    ax_zero = (ea == '0);
    bx_zero = (eb == '0);
    a_inf = (ea == EMAX) && (a[MW-1:0] == '0);
    b_inf = (eb == EMAX) && (b[MW-1:0] == '0);
    a_nan = (ea == EMAX) && (a[MW-1:0] != '0);
    b_nan = (eb == EMAX) && (b[MW-1:0] != '0);

    // Larger magnitude first.
    swap = (b[W-2:0] > a[W-2:0]);
    sx = swap ? sb : sa;
    sy = swap ? sa : sb;
    ex = swap ? eb : ea;
    ey = swap ? ea : eb;
    mx = swap ? b[MW-1:0] : a[MW-1:0];
    my = swap ? a[MW-1:0] : b[MW-1:0];
    d  = ex - ey;

    xf = {1'b1, mx, 3'b000};
    yf = {1'b1, my, 3'b000};
    if (d >= EW'(FW)) begin
      ys     = '0;
      sticky = 1'b1;
    end else begin
      ys     = yf >> d;
      sticky = ((ys << d) != yf);
    end
    ys[0] = ys[0] | sticky;

    eff_sub = (sx != sy);
    sum = eff_sub ? ({1'b0, xf} - {1'b0, ys}) : ({1'b0, xf} + {1'b0, ys});

    // Leading zeros of the FW+1 bit sum, counted from its top bit.
    lz = '0;
    for (int i = 0; i <= int'(FW); i++) begin
      if (sum[i]) lz = SW'(FW - i);
    end
    norm = sum << lz;                       // leading one now at bit FW
    er   = $signed({2'b00, ex}) + 1 - $signed({1'b0, lz});

    // Result assembly, special cases first.
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = {1'b0, EMAX, 1'b1, {(MW-1){1'b0}}};
    end else if (a_inf) begin
      y = {sa, EMAX, {MW{1'b0}}};
    end else if (b_inf) begin
      y = {sb, EMAX, {MW{1'b0}}};
    end else if (ax_zero && bx_zero) begin
      y = {sa & sb, {(W-1){1'b0}}};
    end else if (ax_zero) begin
      y = {sb, b[W-2:0]};
    end else if (bx_zero) begin
      y = {sa, a[W-2:0]};
    end else if (sum == '0) begin
      y = '0;                                // x - x = +0 when rounding to zero
    end else if (er <= 0) begin
      y = {sx, {(W-1){1'b0}}};
    end else if (er >= $signed({2'b00, EMAX})) begin
      y = {sx, EMAX, {MW{1'b0}}};
    end else begin
      y = {sx, er[EW-1:0], norm[FW-1 -: MW]};
    end
  end
endmodule
