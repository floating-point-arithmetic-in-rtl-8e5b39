// fpu_sp_compare: single-precision comparator function unit. Latency 1.
//
// Operations, numbered in alphabetical order: ABSF, EQF, GEF, GTF, LEF, LTF,
// NEF, NEGF. Comparisons compute t1 <op> o1 and return 1 or 0. ABSF and NEGF act
// on t1 alone, clearing or flipping its sign bit. The logic is fp_cmp_core. The
// result is registered in the output register at the clock edge that takes in
// the trigger, so it can be read in the next cycle. It is held until the next
// operation. o1 has a port register with same-cycle forwarding. glock stalls
// the unit, and rstx is an active-low asynchronous reset. The operation set and
// the latency follow the described unit.
module fpu_sp_compare
  import fpu_pkg::*;
#(
  parameter int unsigned mw    = 23,
  parameter int unsigned ew    = 8,
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

  initial assert (dataw >= W && busw >= W);

  fu_operand_reg #(.W(dataw)) u_o1 (.clk, .rstx, .glock, .load(o1load), .data(o1data), .q(o1q));

  fp_cmp_core #(.MW(mw), .EW(ew)) u_core (
    .a(t1data[W-1:0]), .b(o1q[W-1:0]), .op(cmp_op_e'(t1opcode)), .y(y)
  );

  fu_pipe_stage #(.W(W)) u_out (.clk, .rstx, .glock, .vin(t1load), .din(y), .vout(), .dout(r));

  assign r1data = busw'(r);
endmodule
