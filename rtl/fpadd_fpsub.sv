// fpadd_fpsub: half-precision floating-point adder-subtractor function unit.
// Operations ADDH (t1 + o1) and SUBH (t1 - o1). Latency 2.
//
// This is the adder-subtractor of the suite (fpu_sp_add_sub) built for half
// precision: 10-bit significand and 5-bit exponent, 16-bit ports. It is set to
// the two-cycle latency of the described low-clock-rate half-precision unit:
// a shadow register on trigger, the adder logic, and the output register.
// Arithmetic rules, interface and stall and reset behaviour are those of
// fpu_sp_add_sub.
module fpadd_fpsub #(
  parameter int unsigned mw      = 10,
  parameter int unsigned ew      = 5,
  parameter int unsigned dataw   = 16,
  parameter int unsigned busw    = 16,
  parameter int unsigned latency = 2
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
  fpu_sp_add_sub #(.mw(mw), .ew(ew), .dataw(dataw), .busw(busw), .latency(latency)) u_add (
    .clk, .rstx, .glock, .t1data, .t1load, .t1opcode, .o1data, .o1load, .r1data
  );
endmodule
