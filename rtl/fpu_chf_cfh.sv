// fpu_chf_cfh: single <-> half precision conversion function unit. Latency 1.
//
// Operations: CFH (t1 single to half, result in the low hew+hmw+1 bits) and CHF
// (t1 half, in its low bits, to single). Exponents are rebiased, except that
// the special exponents stay special: all-ones stays all-ones (INF, NaN) and
// zero stays zero. The significand is truncated toward half precision and
// zero-padded toward single precision, as described for this unit. These
// boundary rules are this design's own choice. A single-precision number too
// large for half becomes INF. One too small becomes zero, as do subnormals. A NaN
// whose payload would be truncated away stays a NaN, with the top significand
// bit set. The result is registered at the trigger edge and held until the next
// one. glock stalls the unit, and rstx is an active-low asynchronous reset.
module fpu_chf_cfh
  import fpu_pkg::*;
#(
  parameter int unsigned smw   = 23,
  parameter int unsigned sew   = 8,
  parameter int unsigned hmw   = 10,
  parameter int unsigned hew   = 5,
  parameter int unsigned dataw = 32,
  parameter int unsigned busw  = 32
) (
  input  logic             clk,
  input  logic             rstx,
  input  logic             glock,
  input  logic [dataw-1:0] t1data,
  input  logic             t1load,
  input  logic [0:0]       t1opcode,
  output logic [busw-1:0]  r1data
);
  localparam int unsigned SW    = smw + sew + 1;
  localparam int unsigned HW    = hmw + hew + 1;
  localparam logic [sew-1:0] SEMAX = '1;
  localparam logic [hew-1:0] HEMAX = '1;
  localparam int signed   SBIAS = (1 << (sew - 1)) - 1;
  localparam int signed   HBIAS = (1 << (hew - 1)) - 1;

  logic [SW-1:0] y, r;

  initial assert (dataw >= SW && busw >= SW && smw >= hmw && sew >= hew);

  always_comb begin
    logic signed [sew+1:0] eu;
    logic [sew-1:0]        se;
    logic [hew-1:0]        he;
    y  = '0;
    se = t1data[SW-2:smw];
    he = t1data[HW-2:hmw];
    eu = $signed((sew+2)'(se)) - $signed((sew+2)'(SBIAS));
    if (fh_op_e'(t1opcode) == FH_CFH) begin
      if (se == SEMAX) begin
        y[HW-1:0] = {t1data[SW-1], HEMAX, t1data[smw-1 -: hmw]};
        if (t1data[smw-1:0] != '0) y[hmw-1] = 1'b1;
      end else if (se == '0 || eu < $signed((sew+2)'(1 - HBIAS))) begin
        y[HW-1:0] = {t1data[SW-1], {(HW-1){1'b0}}};
      end else if (eu > $signed((sew+2)'(HBIAS))) begin
        y[HW-1:0] = {t1data[SW-1], HEMAX, {hmw{1'b0}}};
      end else begin
        y[HW-1:0] = {t1data[SW-1], hew'(eu + $signed((sew+2)'(HBIAS))), t1data[smw-1 -: hmw]};
      end
    end else begin
      if (he == HEMAX)
        y = {t1data[HW-1], SEMAX, t1data[hmw-1:0], {(smw-hmw){1'b0}}};
      else if (he == '0)
        y = {t1data[HW-1], {(SW-1){1'b0}}};
      else
        y = {t1data[HW-1], sew'(he) - sew'(HBIAS) + sew'(SBIAS), t1data[hmw-1:0], {(smw-hmw){1'b0}}};
    end
  end

  fu_pipe_stage #(.W(SW)) u_out (.clk, .rstx, .glock, .vin(t1load), .din(y), .vout(), .dout(r));

  assign r1data = busw'(r);
endmodule
