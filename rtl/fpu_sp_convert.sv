// fpu_sp_convert: float <-> integer conversion function unit. Latency 4.
//
// Operations, in alphabetical order: CFI (float to signed int), CFIU (float to
// unsigned int), CIF (signed int to float), CIFU (unsigned int to float). The
// integers are dataw bits wide. The operand is t1 and the result is on r1data
// 4 cycles after the trigger, held until the next result. The first register is
// the shadow register of the operand and opcode. The conversion logic
// (fp_cvt_core) follows, then three registers. The last one is the output
// register. The four-cycle latency follows the described unit. The register
// placement is this design's own choice. glock stalls the unit, and rstx is an
// active-low asynchronous reset.
module fpu_sp_convert
  import fpu_pkg::*;
#(
  parameter int unsigned mw      = 23,
  parameter int unsigned ew      = 8,
  parameter int unsigned dataw   = 32,
  parameter int unsigned busw    = 32,
  parameter int unsigned latency = 4
) (
  input  logic             clk,
  input  logic             rstx,
  input  logic             glock,
  input  logic [dataw-1:0] t1data,
  input  logic             t1load,
  input  logic [1:0]       t1opcode,
  output logic [busw-1:0]  r1data
);
  logic             v1;
  logic [dataw+1:0] s1;
  logic [dataw-1:0] y, r;

  initial assert (latency >= 2 && busw >= dataw && dataw >= mw + ew + 1);

  fu_pipe_stage #(.W(dataw + 2)) u_sh (
    .clk, .rstx, .glock, .vin(t1load), .din({t1opcode, t1data}), .vout(v1), .dout(s1)
  );

  fp_cvt_core #(.MW(mw), .EW(ew), .IW(dataw)) u_core (
    .x(s1[dataw-1:0]), .op(cvt_op_e'(s1[dataw+1:dataw])), .y(y)
  );

  fu_delay #(.W(dataw), .N(latency - 1)) u_out (.clk, .rstx, .glock, .vin(v1), .din(y), .vout(), .dout(r));

  assign r1data = busw'(r);
endmodule
