// fpu_sp_mul: single-precision floating-point multiplier function unit.
// One operation, MULF (t1 * o1). Latency 5.
//
// Interface and timing follow fpu_sp_add_sub. The operand o1 has a port
// register. A write to t1 triggers the operation. The result is on r1data
// `latency` cycles later and is held until the next result. glock stalls the
// unit, and rstx is an active-low asynchronous reset. The unit has no operation
// code. The first register is the shadow register of the operands. The
// multiplication (fp_mul_core) follows, then latency-1 registers. They give
// synthesis room to retime around the wide integer multiplier, as the
// multiplier's extra "truncation" stage is meant to. The latency of 5 is the
// unit's specified one. The register placement is this design's own choice.
module fpu_sp_mul #(
  parameter int unsigned mw      = 23,
  parameter int unsigned ew      = 8,
  parameter int unsigned dataw   = 32,
  parameter int unsigned busw    = 32,
  parameter int unsigned latency = 5
) (
  input  logic             clk,
  input  logic             rstx,
  input  logic             glock,
  input  logic [dataw-1:0] t1data,
  input  logic             t1load,
  input  logic [dataw-1:0] o1data,
  input  logic             o1load,
  output logic [busw-1:0]  r1data
);
  localparam int unsigned W = mw + ew + 1;

  logic [dataw-1:0] o1q;
  logic             v1, vr;
  logic [2*W-1:0]   s1;
  logic [W-1:0]     y, r;

  initial assert (latency >= 2 && dataw >= W && busw >= W);

  fu_operand_reg #(.W(dataw)) u_o1 (.clk, .rstx, .glock, .load(o1load), .data(o1data), .q(o1q));

  fu_pipe_stage #(.W(2*W)) u_sh (
    .clk, .rstx, .glock, .vin(t1load), .din({t1data[W-1:0], o1q[W-1:0]}), .vout(v1), .dout(s1)
  );

  fp_mul_core #(.MW(mw), .EW(ew)) u_core (.a(s1[2*W-1:W]), .b(s1[W-1:0]), .y(y));

  fu_delay #(.W(W), .N(latency - 1)) u_out (.clk, .rstx, .glock, .vin(v1), .din(y), .vout(vr), .dout(r));

  assign r1data = busw'(r);
endmodule
