// fp_cmp_core: combinational floating-point comparator and sign operations.
//
// op is one of the fpu_pkg cmp_op_e codes. The six comparisons return 1 or 0
// in the least significant bit. ABS clears the sign bit and NEG flips it.
// Both leave every other bit alone, NaNs included. Magnitudes are compared as
// unsigned integers on the low MW+EW bits, which the biased-exponent layout
// allows. Cheap sign logic then gives each comparison. Subnormals count as zero,
// so +0 and -0 (and any subnormal) are equal. Any comparison with a NaN is false,
// except NE, which is true.
module fp_cmp_core
  import fpu_pkg::*;
#(
  parameter int unsigned MW = 23,
  parameter int unsigned EW = 8
) (
  input  logic [MW+EW:0] a,
  input  logic [MW+EW:0] b,
  input  cmp_op_e        op,
  output logic [MW+EW:0] y
);
  localparam int unsigned W = MW + EW + 1;
  localparam logic [EW-1:0] EMAX = '1;

  logic          an, bn, unord, eq, lt, gt;
  logic [W-2:0]  ma, mb;

  always_comb begin
    an    = (a[W-2:MW] == EMAX) && (a[MW-1:0] != '0);
    bn    = (b[W-2:MW] == EMAX) && (b[MW-1:0] != '0);
    unord = an || bn;
    ma    = (a[W-2:MW] == '0) ? '0 : a[W-2:0];
    mb    = (b[W-2:MW] == '0) ? '0 : b[W-2:0];
    if (ma == '0 && mb == '0) begin
      eq = 1'b1; lt = 1'b0;
    end else if (a[W-1] != b[W-1]) begin
      eq = 1'b0; lt = a[W-1];
    end else begin
      eq = (ma == mb);
      lt = a[W-1] ? (ma > mb) : (ma < mb);
    end
    gt = !eq && !lt;
    y  = '0;
    unique case (op)
      CMP_ABS: y = {1'b0, a[W-2:0]};
      CMP_NEG: y = {~a[W-1], a[W-2:0]};
      CMP_EQ:  y[0] = !unord && eq;
      CMP_NE:  y[0] = unord || !eq;
      CMP_LT:  y[0] = !unord && lt;
      CMP_LE:  y[0] = !unord && (lt || eq);
      CMP_GT:  y[0] = !unord && gt;
      CMP_GE:  y[0] = !unord && (gt || eq);
      default: y = '0;
    endcase
  end
endmodule
