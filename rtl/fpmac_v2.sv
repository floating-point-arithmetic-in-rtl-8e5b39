// fpmac_v2: half-precision fused multiply-adder function unit. Latency 2 to 6.
//
// Operations, in alphabetical order: ADDH (t1 + o1), MACH (t1 + o1*o2),
// MSUH (t1 - o1*o2), MULH (t1 * o1), SUBH (t1 - o1). The codes are the same
// as the single-precision unit's. It is the single-precision fused
// multiply-adder (fpu_sp_mac_v2) with a 10-bit significand, a 5-bit exponent
// and 16-bit ports, as described. bypass_2 .. bypass_5 remove pipeline
// registers 2 to 5 exactly as there. All bypass flags are off by default,
// giving latency 6.
module fpmac_v2 #(
  parameter int unsigned mw       = 10,
  parameter int unsigned ew       = 5,
  parameter int unsigned dataw    = 16,
  parameter int unsigned busw     = 16,
  parameter bit          bypass_2 = 1'b0,
  parameter bit          bypass_3 = 1'b0,
  parameter bit          bypass_4 = 1'b0,
  parameter bit          bypass_5 = 1'b0
) (
  input  logic             clk,
  input  logic             rstx,
  input  logic             glock,
  input  logic [dataw-1:0] t1data,
  input  logic             t1load,
  input  logic [2:0]       t1opcode,
  input  logic [dataw-1:0] o1data,
  input  logic             o1load,
  input  logic [dataw-1:0] o2data,
  input  logic             o2load,
  output logic [busw-1:0]  r1data
);
  fpu_sp_mac_v2 #(
    .mw(mw), .ew(ew), .dataw(dataw), .busw(busw),
    .bypass_2(bypass_2), .bypass_3(bypass_3), .bypass_4(bypass_4), .bypass_5(bypass_5)
  ) u_mac (
    .clk, .rstx, .glock, .t1data, .t1load, .t1opcode, .o1data, .o1load, .o2data, .o2load, .r1data
  );
endmodule
