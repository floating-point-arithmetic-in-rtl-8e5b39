// fpu_hp_compare: half-precision comparator function unit. Latency 1.
//
// It is the single-precision comparator set to a 10-bit significand and a 5-bit
// exponent. Only the operation codes differ. In alphabetical order the half
// operations are ABSH, EQH, GEH, GTH, LEH, LTH, NEGH, NEH. So the codes of the
// negation and the not-equal test are swapped with respect to NEF/NEGF, and this
// unit maps them back before the shared comparator logic. Operands are the low
// 16 bits of t1 and o1, and the result is zero-extended to busw. Timing and
// interface are those of fpu_sp_compare.
module fpu_hp_compare
  import fpu_pkg::*;
#(
  parameter int unsigned mw    = 10,
  parameter int unsigned ew    = 5,
  parameter int unsigned dataw = 32,
  parameter int unsigned busw  = 32
) (
  input  logic             clk,
  input  logic             rstx,
  input  logic             glock,
  input  logic [dataw-1:0] t1data,
  input  logic             t1load,
  input  logic [2:0]       t1opcode,
  input  logic [dataw-1:0] o1data,
  input  logic             o1load,
  output logic [busw-1:0]  r1data
);
  localparam int unsigned W = mw + ew + 1;

  logic [dataw-1:0] o1q;
  logic [W-1:0]     y, r;
  cmp_op_e          op;

  initial assert (dataw >= W && busw >= W);

  always_comb begin
    unique case (t1opcode)
      HCMP_NEG: op = CMP_NEG;
      HCMP_NE:  op = CMP_NE;
      default:  op = cmp_op_e'(t1opcode);
    endcase
  end

  fu_operand_reg #(.W(dataw)) u_o1 (.clk, .rstx, .glock, .load(o1load), .data(o1data), .q(o1q));

  fp_cmp_core #(.MW(mw), .EW(ew)) u_core (.a(t1data[W-1:0]), .b(o1q[W-1:0]), .op(op), .y(y));

  fu_pipe_stage #(.W(W)) u_out (.clk, .rstx, .glock, .vin(t1load), .din(y), .vout(), .dout(r));

  assign r1data = busw'(r);
endmodule
