// fpmul: half-precision floating-point multiplier function unit (MULH, t1 * o1).
// Latency 2.
//
// This is the multiplier of the suite (fpu_sp_mul) built for half precision:
// 10-bit significand and 5-bit exponent, 16-bit ports. It is set to the
// two-cycle latency of the described half-precision unit. Arithmetic rules,
// interface and stall and reset behaviour are those of fpu_sp_mul.
module fpmul #(
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
  input  logic [dataw-1:0] o1data,
  input  logic             o1load,
  output logic [busw-1:0]  r1data
);
  fpu_sp_mul #(.mw(mw), .ew(ew), .dataw(dataw), .busw(busw), .latency(latency)) u_mul (
    .clk, .rstx, .glock, .t1data, .t1load, .o1data, .o1load, .r1data
  );
endmodule
