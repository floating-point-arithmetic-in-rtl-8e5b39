// fpu_sp_add_sub: single-precision floating-point adder-subtractor function
// unit. Operations ADDF (t1 + o1) and SUBF (t1 - o1). Latency 5.
//
// Interface: the unit follows the transport-triggered function-unit semantics.
// Operand o1 is written into its port register on o1load. Writing the trigger
// port t1 (t1load) starts the operation selected by t1opcode, using o1's
// register or, when moved in the same cycle, o1's data lines. After `latency`
// clock cycles the result appears on r1data. It stays there until a later
// operation completes. Operations can be triggered on every cycle. glock (high)
// freezes the whole unit, and rstx is an active-low asynchronous reset.
// Timing: the first register captures the operands only when triggered (the
// shadow registers that keep the operation logic still while idle). The
// addition logic (fp_add_core) follows, then latency-1 registers. The last of
// those is the output register. The latency of 5 and the parameters mw/ew/dataw/
// busw come from the unit's specification. Placing all the logic ahead of one
// register chain, for synthesis to retime, is this design's own choice.
module fpu_sp_add_sub #(
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
  input  logic [0:0]       t1opcode,
  input  logic [dataw-1:0] o1data,
  input  logic             o1load,
  output logic [busw-1:0]  r1data
);
  localparam int unsigned W = mw + ew + 1;

  logic [dataw-1:0] o1q;
  logic             v1;
  logic [W:0]       s1, s0;
  logic [W-1:0]     y, r;
  logic             vr;

  initial assert (latency >= 2 && dataw >= W && busw >= W);

  fu_operand_reg #(.W(dataw)) u_o1 (.clk, .rstx, .glock, .load(o1load), .data(o1data), .q(o1q));

  // Shadow registers: opcode and the two operands, captured on trigger.
  logic [W-1:0] a_q, b_q;
  assign s0 = {t1opcode, t1data[W-1:0]};
  fu_pipe_stage #(.W(W+1)) u_sh_a (.clk, .rstx, .glock, .vin(t1load), .din(s0), .vout(v1), .dout(s1));
  fu_pipe_stage #(.W(W))   u_sh_b (.clk, .rstx, .glock, .vin(t1load), .din(o1q[W-1:0]), .vout(), .dout(b_q));
  assign a_q = s1[W-1:0];

  fp_add_core #(.MW(mw), .EW(ew)) u_core (.a(a_q), .b(b_q), .sub(s1[W]), .y(y));

  fu_delay #(.W(W), .N(latency - 1)) u_out (.clk, .rstx, .glock, .vin(v1), .din(y), .vout(vr), .dout(r));

  assign r1data = busw'(r);
endmodule
