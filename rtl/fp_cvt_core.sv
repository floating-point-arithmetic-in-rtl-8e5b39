// fp_cvt_core: combinational conversion between floats and IW-bit integers.
//
// CFI / CFIU convert a float to a signed / unsigned integer, truncating toward
// zero. CIF / CIFU convert a signed / unsigned integer to a float, also
// truncating. With rounding toward zero this is exactly the IEEE-754 result,
// as the embedded profile requires of conversions. The signed integer-to-float
// path takes the absolute value (a full two's-complement negation), counts
// leading zeros and shifts. This is the unit's critical operation.
// Out-of-range float-to-integer results saturate, and so does INF. Negative
// inputs to CFIU give 0, and NaN gives 0. These choices are this design's own.
// An integer too large for the float format (possible only for narrow
// exponents) gives INF.
module fp_cvt_core
  import fpu_pkg::*;
#(
  parameter int unsigned MW = 23,
  parameter int unsigned EW = 8,
  parameter int unsigned IW = 32
) (
  input  logic [IW-1:0] x,
  input  cvt_op_e       op,
  output logic [IW-1:0] y
);
  localparam int unsigned W    = MW + EW + 1;
  localparam logic [EW-1:0] EMAX = '1;
  localparam int signed   BIAS = (1 << (EW - 1)) - 1;
  localparam int unsigned LW   = $clog2(IW + 1);

  logic                 s, z, inf, nan;
  logic signed [EW+1:0] eu;
  logic [IW+MW:0]       big;
  logic [IW-1:0]        mag, norm;
  logic [LW-1:0]        lz;
  logic signed [EW+LW+1:0] ef;

  always_comb begin
    s   = x[W-1];
    z   = (x[W-2:MW] == '0);
    inf = (x[W-2:MW] == EMAX) && (x[MW-1:0] == '0);
    nan = (x[W-2:MW] == EMAX) && (x[MW-1:0] != '0);
    eu  = $signed((EW+2)'(x[W-2:MW])) - $signed((EW+2)'(BIAS));
    big = '0;
    mag = '0;
    norm = '0;
    lz  = '0;
    ef  = '0;
    y   = '0;
    unique case (op)
      CVT_CFI, CVT_CFIU: begin
        if (!z && !nan && !inf && eu >= 0 && eu < $signed((EW+2)'(IW)))
          big = (IW+MW+1)'({1'b1, x[MW-1:0]}) << eu;
        mag = big[IW+MW-1:MW];
        if (op == CVT_CFI) begin
          if (nan || z || eu < 0)             y = '0;
          else if (inf || eu >= $signed((EW+2)'(IW - 1)))
                                              y = s ? {1'b1, {(IW-1){1'b0}}} : {1'b0, {(IW-1){1'b1}}};
          else                                y = s ? (~mag + 1'b1) : mag;
        end else begin
          if (nan || z || s || eu < 0)        y = '0;
          else if (inf || eu >= $signed((EW+2)'(IW)))
                                              y = '1;
          else                                y = mag;
        end
      end
      default: begin  // CIF, CIFU
        logic neg;
        neg = (op == CVT_CIF) && x[IW-1];
        mag = neg ? (~x + 1'b1) : x;
        for (int i = 0; i < int'(IW); i++) if (mag[i]) lz = LW'(IW - 1 - i);
        norm = mag << lz;
        ef   = $signed((EW+LW+2)'(BIAS)) + $signed((EW+LW+2)'(IW - 1)) - $signed((EW+LW+2)'(lz));
        if (mag == '0)                        y = '0;
        else if (ef >= $signed((EW+LW+2)'(EMAX)))
                                              y = IW'({neg, EMAX, {MW{1'b0}}});
        else                                  y = IW'({neg, ef[EW-1:0], norm[IW-2 -: MW]});
      end
    endcase
  end
endmodule
