// fp_mul_core: combinational floating-point multiplier, y = a * b.
//
// Format and arithmetic rules are those of fp_add_core: rounding toward zero,
// subnormals read and written as zero, INF and NaN generated and propagated,
// overflow to INF. The (MW+1) x (MW+1) significand product is normalized by at
// most one position, because both inputs are normal. The result is then
// truncated.
module fp_mul_core #(
  parameter int unsigned MW = 23,
  parameter int unsigned EW = 8
) (
  input  logic [MW+EW:0] a,
  input  logic [MW+EW:0] b,
  output logic [MW+EW:0] y
);
  localparam int unsigned W    = MW + EW + 1;
  localparam logic [EW-1:0] EMAX = '1;
  localparam int signed   BIAS = (1 << (EW - 1)) - 1;

  logic          s, a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [2*MW+1:0] p;
  logic [MW-1:0] m;
  logic signed [EW+2:0] e;

  always_comb begin
    s      = a[W-1] ^ b[W-1];
    a_zero = (a[W-2:MW] == '0);
    b_zero = (b[W-2:MW] == '0);
    a_inf  = (a[W-2:MW] == EMAX) && (a[MW-1:0] == '0);
    b_inf  = (b[W-2:MW] == EMAX) && (b[MW-1:0] == '0);
    a_nan  = (a[W-2:MW] == EMAX) && (a[MW-1:0] != '0);
    b_nan  = (b[W-2:MW] == EMAX) && (b[MW-1:0] != '0);

    p = (2*MW+2)'({1'b1, a[MW-1:0]}) * (2*MW+2)'({1'b1, b[MW-1:0]});
    e = $signed({3'b000, a[W-2:MW]}) + $signed({3'b000, b[W-2:MW]}) - BIAS;
    if (p[2*MW+1]) begin
      m = p[2*MW -: MW];
      e = e + 1;
    end else begin
      m = p[2*MW-1 -: MW];
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = {1'b0, EMAX, 1'b1, {(MW-1){1'b0}}};
    else if (a_inf || b_inf)
      y = {s, EMAX, {MW{1'b0}}};
    else if (a_zero || b_zero || e <= 0)
      y = {s, {(W-1){1'b0}}};
    else if (e >= $signed({3'b000, EMAX}))
      y = {s, EMAX, {MW{1'b0}}};
    else
      y = {s, e[EW-1:0], m};
  end
endmodule
