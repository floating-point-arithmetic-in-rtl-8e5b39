// fpu_sp_accel: helper unit for division and square root in software on the
// fused multiply-adder. Single precision, latency 1.
//
// Operations, in alphabetical order (t1 is the trigger, o1 the operand):
//   INITDIV  a = t1, b = o1. r1 = a' = |a| scaled into [1,2) and r2 = b' = |b|
//            scaled into [1,2). r3 = c = sign(a*b) * 2^(ea-eb), so that
//            a/b = c * (a'/b'). If a/b is a special case, a' = b' = 1.0 and c
//            is the special result itself (NaN, signed INF or signed zero).
//   INITSQRT b = t1. r1 = b' = b * 2^-2n, with its exponent set to 0 or 1, and
//            r3 = c = 2^n. Then sqrt(b) = c * sqrt(b'). Special inputs give
//            b' = 1.0 and c = sqrt(b) (NaN, INF or signed zero).
//   MULP2    r1 = t1 * o1 where o1 is a power of two, 0, INF or NaN. o1's
//            significand only tells INF from NaN. Only exponents are added.
//   RECIPA   r1 = approximation of 1/b' from a table of 2^recip_lut_bits entries,
//            each recip_lut_bits wide, indexed by b's top significand bits.
//   RSQRTA   r1 = approximation of 1/sqrt(b'), where b' is the value INITSQRT
//            would produce. The table is indexed by the exponent's parity and
//            the top rsqrt_lut_bits-1 significand bits, one half-table for even
//            and one for odd exponents, with entries rsqrt_lut_bits wide.
// Table entries are the reciprocal (root) at the centre of each input interval:
//   RECIPA: frac = 2^(k+2) * 2^k / (2^(k+1) + 2i + 1) - 2^k,  k = recip_lut_bits
//   RSQRTA: frac = isqrt(2^(2k+j+3) / M) - 2^k,  k = rsqrt_lut_bits, j = k - 1,
//           M = (2^(j+1) + 2i + 1) * (1 or 2 for an odd exponent)
// Both results lie in (0.5, 1] and are returned as a float with exponent -1 and
// the entry as the top fraction bits (clamped below 1.0).
// The five operations, the one-cycle latency and the use of the table sizes
// follow the proposed accelerator unit (8x8 reciprocal and 7x7 inverse-root
// tables are the sizes found sufficient). The exact operand and result mapping,
// including where INITDIV puts its three outputs, is this design's own choice.
// Results stay in their output registers until the next operation. Out-of-range
// scale factors in INITDIV are clamped to zero or INF. glock stalls the unit, and
// rstx is an active-low asynchronous reset.
module fpu_sp_accel
  import fpu_pkg::*;
#(
  parameter int unsigned mw              = 23,
  parameter int unsigned ew              = 8,
  parameter int unsigned dataw           = 32,
  parameter int unsigned busw            = 32,
  parameter int unsigned recip_lut_bits  = 8,
  parameter int unsigned rsqrt_lut_bits  = 7
) (
  input  logic             clk,
  input  logic             rstx,
  input  logic             glock,
  input  logic [dataw-1:0] t1data,
  input  logic             t1load,
  input  logic [2:0]       t1opcode,
  input  logic [dataw-1:0] o1data,
  input  logic             o1load,
  output logic [busw-1:0]  r1data,
  output logic [busw-1:0]  r2data,
  output logic [busw-1:0]  r3data
);
  localparam int unsigned W    = mw + ew + 1;
  localparam int unsigned RK   = recip_lut_bits;
  localparam int unsigned QK   = rsqrt_lut_bits;
  localparam logic [ew-1:0] EMAX = '1;
  localparam int signed   BIAS = (1 << (ew - 1)) - 1;
  localparam logic [ew-1:0] EB   = ew'(BIAS);
  localparam logic [W-1:0] ONE  = {1'b0, EB, {mw{1'b0}}};
  localparam logic [W-1:0] QNAN = {1'b0, EMAX, 1'b1, {(mw-1){1'b0}}};

  function automatic longint unsigned isqrt(longint unsigned n);
    longint unsigned r, b;
    r = 0;
    for (int i = 31; i >= 0; i--) begin
      b = r | (64'd1 << i);
      if (b * b <= n) r = b;
    end
    return r;
  endfunction

  function automatic logic [RK-1:0] recip_entry(int unsigned i);
    longint unsigned v;
    v = ((64'd1 << (2 * RK + 2)) / ((64'd1 << (RK + 1)) + 2 * i + 1));
    v = v - (64'd1 << RK);
    if (v >= (64'd1 << RK)) v = (64'd1 << RK) - 1;
    return RK'(v);
  endfunction

  function automatic logic [QK-1:0] rsqrt_entry(int unsigned idx);
    longint unsigned m, v;
    int unsigned j, i;
    j = QK - 1;
    i = idx % (1 << j);
    m = (64'd1 << (j + 1)) + 2 * i + 1;
    if (idx >= (1 << j)) m = 2 * m;       // odd exponent: b' in [2,4)
    v = isqrt((64'd1 << (2 * QK + j + 3)) / m);
    if (v < (64'd1 << QK)) v = 64'd1 << QK;
    v = v - (64'd1 << QK);
    if (v >= (64'd1 << QK)) v = (64'd1 << QK) - 1;
    return QK'(v);
  endfunction

  logic [RK-1:0] recip_lut [2**RK];
  logic [QK-1:0] rsqrt_lut [2**QK];
  for (genvar g = 0; g < 2**RK; g++) begin : g_rl
    assign recip_lut[g] = recip_entry(g);
  end
  for (genvar g = 0; g < 2**QK; g++) begin : g_ql
    assign rsqrt_lut[g] = rsqrt_entry(g);
  end

  initial assert (dataw >= W && busw >= W && RK <= mw && QK <= mw + 1);

  logic [dataw-1:0] o1q;
  fu_operand_reg #(.W(dataw)) u_o1 (.clk, .rstx, .glock, .load(o1load), .data(o1data), .q(o1q));

  logic [W-1:0] y1, y2, y3, q1, q2, q3;
  always_comb begin
    logic [W-1:0]          a, b;
    logic                  az, bz, ai, bi, an, bn, s;
    logic signed [ew+2:0]  e;
    logic                  odd;
    logic signed [ew+2:0]  eu, n;
    a  = t1data[W-1:0];
    b  = o1q[W-1:0];
    az = (a[W-2:mw] == '0);
    bz = (b[W-2:mw] == '0);
    ai = (a[W-2:mw] == EMAX) && (a[mw-1:0] == '0);
    bi = (b[W-2:mw] == EMAX) && (b[mw-1:0] == '0);
    an = (a[W-2:mw] == EMAX) && (a[mw-1:0] != '0);
    bn = (b[W-2:mw] == EMAX) && (b[mw-1:0] != '0);
    s  = a[W-1] ^ b[W-1];
    odd = !a[mw];                          // parity of (ea - BIAS), BIAS odd
    y1 = '0; y2 = '0; y3 = '0; e = '0; eu = '0; n = '0;
    unique case (acc_op_e'(t1opcode))
      ACC_INITDIV: begin
        y1 = ONE; y2 = ONE;
        e  = $signed((ew+3)'(a[W-2:mw])) - $signed((ew+3)'(b[W-2:mw])) + $signed((ew+3)'(BIAS));
        if (an || bn || (az && bz) || (ai && bi)) y3 = QNAN;
        else if (ai || bz)                        y3 = {s, EMAX, {mw{1'b0}}};
        else if (az || bi)                        y3 = {s, {(W-1){1'b0}}};
        else begin
          y1 = {1'b0, EB, a[mw-1:0]};
          y2 = {1'b0, EB, b[mw-1:0]};
          if (e <= 0)                             y3 = {s, {(W-1){1'b0}}};
          else if (e >= $signed((ew+3)'(EMAX)))   y3 = {s, EMAX, {mw{1'b0}}};
          else                                    y3 = {s, e[ew-1:0], {mw{1'b0}}};
        end
      end
      ACC_INITSQRT: begin
        y1 = ONE;
        eu = $signed((ew+3)'(a[W-2:mw])) - $signed((ew+3)'(BIAS));
        n  = eu >>> 1;
        if (an || (a[W-1] && !az)) y3 = QNAN;
        else if (az)               y3 = {a[W-1], {(W-1){1'b0}}};
        else if (ai)               y3 = {1'b0, EMAX, {mw{1'b0}}};
        else begin
          e  = n + $signed((ew+3)'(BIAS));
          y3 = {1'b0, e[ew-1:0], {mw{1'b0}}};
          y1 = {1'b0, odd ? (EB + 1'b1) : EB, a[mw-1:0]};
        end
      end
      ACC_MULP2: begin
        e = $signed((ew+3)'(a[W-2:mw])) + $signed((ew+3)'(b[W-2:mw])) - $signed((ew+3)'(BIAS));
        if (an || bn || (ai && bz) || (bi && az)) y1 = QNAN;
        else if (ai || bi)                        y1 = {s, EMAX, {mw{1'b0}}};
        else if (az || bz || e <= 0)              y1 = {s, {(W-1){1'b0}}};
        else if (e >= $signed((ew+3)'(EMAX)))     y1 = {s, EMAX, {mw{1'b0}}};
        else                                      y1 = {s, e[ew-1:0], a[mw-1:0]};
      end
      ACC_RECIPA: begin
        y1 = {1'b0, EB - 1'b1, recip_lut[a[mw-1 -: RK]], {(mw-RK){1'b0}}};
      end
      ACC_RSQRTA: begin
        y1 = {1'b0, EB - 1'b1, rsqrt_lut[{odd, a[mw-1 -: QK-1]}], {(mw-QK){1'b0}}};
      end
      default: ;
    endcase
  end

  fu_pipe_stage #(.W(3*W)) u_out (
    .clk, .rstx, .glock, .vin(t1load), .din({y1, y2, y3}), .vout(), .dout({q1, q2, q3})
  );

  assign r1data = busw'(q1);
  assign r2data = busw'(q2);
  assign r3data = busw'(q3);
endmodule
