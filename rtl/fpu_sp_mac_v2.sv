// fpu_sp_mac_v2: single-precision fused multiply-adder function unit.
// Latency 2 to 6, set by the bypass_2 .. bypass_5 parameters. The default is 6.
//
// Operations, in alphabetical order (t1 is the trigger, o1 and o2 the operands):
//   ADDF  t1 + o1          MACF  t1 + o1*o2      MSUF  t1 - o1*o2
//   MULF  t1 * o1          SUBF  t1 - o1
// All five map onto one datapath that computes A + B*C with a single rounding.
// Addition multiplies by 1.0. Multiplication adds -0, which keeps the sign of a
// zero product. The subtracting forms flip the sign of B. The product B*C is
// kept exact (2mw+2 bits). Because both factors are normal, it needs at most a
// one-bit normalization. The sum is formed as in the adder: larger magnitude
// first, the other aligned with guard and sticky bits, add or subtract,
// normalize, truncate. Rounding is toward zero. Subnormals read and write as
// zero. INF and NaN follow IEEE-754 (0*INF and INF-INF give NaN). Overflow gives
// INF.
// Pipeline (registers between the stages):
//   1  shadow register of opcode and operands (always present)
//   2  after operand selection, unpacking and the significand multiplier
//   3  after magnitude ordering and alignment
//   4  after the significand adder
//   5  after leading-zero count and normalizing shift
//   6  output register after packing (always present)
// Setting bypass_N turns register N into wires, so each flag removes one cycle
// of latency. This follows the described unit: six stages, four of them
// bypassable, latency 2 to 6. The logic placed in each stage is this design's
// own choice. The result is held on r1data until a later operation completes.
// glock stalls the unit, and rstx is an active-low asynchronous reset.
module fpu_sp_mac_v2
  import fpu_pkg::*;
#(
  parameter int unsigned mw       = 23,
  parameter int unsigned ew       = 8,
  parameter int unsigned dataw    = 32,
  parameter int unsigned busw     = 32,
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
  localparam int unsigned W    = mw + ew + 1;
  localparam int unsigned PW   = 2 * mw + 2;        // exact product width, also 1.F
  localparam int unsigned FW   = PW + 3;            // 1.F plus 3 guard bits
  localparam int unsigned XW   = ew + 3;            // signed exponent width
  localparam int unsigned SW   = $clog2(FW + 2);
  localparam logic [ew-1:0] EMAX = '1;
  localparam int signed   BIAS = (1 << (ew - 1)) - 1;
  localparam logic [W-1:0] ONE     = {1'b0, 1'b0, {(ew-1){1'b1}}, {mw{1'b0}}};
  localparam logic [W-1:0] NEGZERO = {1'b1, {(W-1){1'b0}}};

  typedef enum logic [1:0] {K_NUM = 2'd0, K_ZERO = 2'd1, K_INF = 2'd2, K_NAN = 2'd3} kind_e;

  // Stage 2: unpacked addend and exact product.
  typedef struct packed {
    kind_e                kind;    // special result, if not K_NUM
    logic                 ks;      // sign of a special result
    logic                 sa, sp;
    logic                 az, pz;
    logic signed [XW-1:0] ea, ep;
    logic [mw:0]          ma;
    logic [PW-1:0]        pm;      // product significand, value in [1,4)
  } s2_t;

  // Stage 3: ordered and aligned significands.
  typedef struct packed {
    kind_e                kind;
    logic                 ks;
    logic                 sx;
    logic                 eff_sub;
    logic signed [XW-1:0] ex;
    logic [FW-1:0]        xf, ys;
  } s3_t;

  // Stage 4: raw sum.
  typedef struct packed {
    kind_e                kind;
    logic                 ks;
    logic                 sx;
    logic signed [XW-1:0] ex;
    logic [FW:0]          sum;
  } s4_t;

  // Stage 5: normalized sum.
  typedef struct packed {
    kind_e                kind;
    logic                 ks;
    logic                 sx;
    logic                 nz;      // sum was non-zero
    logic signed [XW-1:0] er;
    logic [mw-1:0]        m;
  } s5_t;

  initial assert (dataw >= W && busw >= W);

  logic [dataw-1:0] o1q, o2q;
  fu_operand_reg #(.W(dataw)) u_o1 (.clk, .rstx, .glock, .load(o1load), .data(o1data), .q(o1q));
  fu_operand_reg #(.W(dataw)) u_o2 (.clk, .rstx, .glock, .load(o2load), .data(o2data), .q(o2q));

  // Register 1: shadow registers.
  logic             v1;
  logic [3*W+2:0]   s1;
  fu_pipe_stage #(.W(3*W+3)) u_r1 (
    .clk, .rstx, .glock, .vin(t1load),
    .din({t1opcode, t1data[W-1:0], o1q[W-1:0], o2q[W-1:0]}), .vout(v1), .dout(s1)
  );

  // Stage 1 logic: select A, B, C, unpack, multiply.
  s2_t n2;
  always_comb begin
    logic [W-1:0] a, b, c;
    logic         an, bn, cn, ai, bi, ci, bz, cz;
    mac_op_e      op;
    op = mac_op_e'(s1[3*W+2:3*W]);
    unique case (op)
      MAC_MUL: begin a = NEGZERO;   b = s1[3*W-1:2*W];                        c = s1[2*W-1:W]; end
      MAC_ADD: begin a = s1[3*W-1:2*W]; b = s1[2*W-1:W];                      c = ONE;         end
      MAC_SUB: begin a = s1[3*W-1:2*W]; b = {~s1[2*W-1], s1[2*W-2:W]};        c = ONE;         end
      MAC_MSU: begin a = s1[3*W-1:2*W]; b = {~s1[2*W-1], s1[2*W-2:W]};        c = s1[W-1:0];   end
      default: begin a = s1[3*W-1:2*W]; b = s1[2*W-1:W];                      c = s1[W-1:0];   end
    endcase
    an = (a[W-2:mw] == EMAX) && (a[mw-1:0] != '0);
    bn = (b[W-2:mw] == EMAX) && (b[mw-1:0] != '0);
    cn = (c[W-2:mw] == EMAX) && (c[mw-1:0] != '0);
    ai = (a[W-2:mw] == EMAX) && (a[mw-1:0] == '0);
    bi = (b[W-2:mw] == EMAX) && (b[mw-1:0] == '0);
    ci = (c[W-2:mw] == EMAX) && (c[mw-1:0] == '0);
    bz = (b[W-2:mw] == '0);
    cz = (c[W-2:mw] == '0);
    n2.sa = a[W-1];
    n2.sp = b[W-1] ^ c[W-1];
    n2.az = (a[W-2:mw] == '0);
    n2.pz = bz || cz;
    n2.ea = $signed(XW'(a[W-2:mw]));
    n2.ep = $signed(XW'(b[W-2:mw])) + $signed(XW'(c[W-2:mw])) - $signed(XW'(BIAS));
    n2.ma = {1'b1, a[mw-1:0]};
    n2.pm = PW'({1'b1, b[mw-1:0]}) * PW'({1'b1, c[mw-1:0]});
    n2.ks = 1'b0;
    if (an || bn || cn || (bi && cz) || (ci && bz) || (ai && (bi || ci) && (a[W-1] != n2.sp))) begin
      n2.kind = K_NAN;
    end else if (ai) begin
      n2.kind = K_INF; n2.ks = a[W-1];
    end else if (bi || ci) begin
      n2.kind = K_INF; n2.ks = n2.sp;
    end else if (n2.az && n2.pz) begin
      n2.kind = K_ZERO; n2.ks = a[W-1] & n2.sp;
    end else begin
      n2.kind = K_NUM;
    end
  end

  logic v2; s2_t q2;
  fu_pipe_stage #(.W($bits(s2_t)), .BYPASS(bypass_2)) u_r2 (
    .clk, .rstx, .glock, .vin(v1), .din(n2), .vout(v2), .dout(q2)
  );

  // Stage 2 logic: bring both to 1.F form, order by magnitude, align.
  s3_t n3;
  always_comb begin
    logic signed [XW-1:0] ep1, ey;
    logic [PW-1:0]        pf, af, xm, ym;
    logic [FW-1:0]        yf, ys;
    logic                 swap, sy, yz, sticky;
    logic signed [XW:0]   d;
    // Product normalized into [1,2) with F = 2mw+1 fraction bits (exact).
    if (q2.pm[PW-1]) begin pf = q2.pm;             ep1 = q2.ep + 1; end
    else             begin pf = {q2.pm[PW-2:0], 1'b0}; ep1 = q2.ep;     end
    af = {q2.ma, {(PW-mw-1){1'b0}}};
    // A zero operand always goes second and is then ignored.
    if (q2.az)      swap = 1'b1;
    else if (q2.pz) swap = 1'b0;
    else            swap = (ep1 > q2.ea) || ((ep1 == q2.ea) && (pf > af));
    n3.kind    = q2.kind;
    n3.ks      = q2.ks;
    n3.sx      = swap ? q2.sp : q2.sa;
    sy         = swap ? q2.sa : q2.sp;
    n3.ex      = swap ? ep1 : q2.ea;
    ey         = swap ? q2.ea : ep1;
    xm         = swap ? pf : af;
    ym         = swap ? af : pf;
    yz         = swap ? q2.az : q2.pz;
    n3.eff_sub = (n3.sx != sy);
    n3.xf      = {xm, 3'b000};
    yf         = {ym, 3'b000};
    d          = $signed({n3.ex[XW-1], n3.ex}) - $signed({ey[XW-1], ey});
    if (yz) begin
      ys = '0; sticky = 1'b0;
    end else if (d >= $signed((XW+1)'(FW))) begin
      ys = '0; sticky = 1'b1;
    end else begin
      ys     = yf >> d;
      sticky = ((ys << d) != yf);
    end
    ys[0] = ys[0] | sticky;
    n3.ys = ys;
  end

  logic v3; s3_t q3;
  fu_pipe_stage #(.W($bits(s3_t)), .BYPASS(bypass_3)) u_r3 (
    .clk, .rstx, .glock, .vin(v2), .din(n3), .vout(v3), .dout(q3)
  );

  // Stage 3 logic: significand adder.
  s4_t n4;
  always_comb begin
    n4.kind = q3.kind;
    n4.ks   = q3.ks;
    n4.sx   = q3.sx;
    n4.ex   = q3.ex;
    n4.sum  = q3.eff_sub ? ({1'b0, q3.xf} - {1'b0, q3.ys}) : ({1'b0, q3.xf} + {1'b0, q3.ys});
  end

  logic v4; s4_t q4;
  fu_pipe_stage #(.W($bits(s4_t)), .BYPASS(bypass_4)) u_r4 (
    .clk, .rstx, .glock, .vin(v3), .din(n4), .vout(v4), .dout(q4)
  );

  // Stage 4 logic: leading-zero count and normalization.
  s5_t n5;
  always_comb begin
    logic [SW-1:0] lz;
    logic [FW:0]   norm;
    lz = '0;
    for (int i = 0; i <= int'(FW); i++) if (q4.sum[i]) lz = SW'(FW - i);
    norm    = q4.sum << lz;
    n5.kind = q4.kind;
    n5.ks   = q4.ks;
    n5.sx   = q4.sx;
    n5.nz   = (q4.sum != '0);
    n5.er   = q4.ex + 1 - $signed(XW'(lz));
    n5.m    = norm[FW-1 -: mw];
  end

  logic v5; s5_t q5;
  fu_pipe_stage #(.W($bits(s5_t)), .BYPASS(bypass_5)) u_r5 (
    .clk, .rstx, .glock, .vin(v4), .din(n5), .vout(v5), .dout(q5)
  );

  // Stage 5 logic: pack; register 6 is the output register.
  logic [W-1:0] y, r;
  always_comb begin
    unique case (q5.kind)
      K_NAN:  y = {1'b0, EMAX, 1'b1, {(mw-1){1'b0}}};
      K_INF:  y = {q5.ks, EMAX, {mw{1'b0}}};
      K_ZERO: y = {q5.ks, {(W-1){1'b0}}};
      default: begin
        if (!q5.nz)                                   y = '0;
        else if (q5.er <= 0)                          y = {q5.sx, {(W-1){1'b0}}};
        else if (q5.er >= $signed(XW'(EMAX)))         y = {q5.sx, EMAX, {mw{1'b0}}};
        else                                          y = {q5.sx, q5.er[ew-1:0], q5.m};
      end
    endcase
  end

  fu_pipe_stage #(.W(W)) u_r6 (.clk, .rstx, .glock, .vin(v5), .din(y), .vout(), .dout(r));

  assign r1data = busw'(r);
endmodule
