// fpu_sp_div: single-precision floating-point divider function unit.
// One operation, DIVF (t1 / o1). Latency ceil(mw/2) + 3, which is 15 for single precision.
//
// The significand quotient is computed base 4, producing two quotient bits per
// pipeline stage. The divisor's multiples 2D and 3D are computed once, up front,
// and travel down the pipeline. Each iteration stage shifts the partial
// remainder R left by two bits. It then tries R - D, R - 2D and R - 3D in
// parallel, keeps the largest difference that is not negative and appends the
// matching digit (0..3) to the quotient. The stages are:
//   1       shadow register of the operands (captured on trigger)
//   2       unpack, special cases, exponent, pre-normalization so the quotient
//           lies in [1,2), integer quotient bit, multiples of D
//   3..N+2  one base-4 iteration each, N = ceil(mw/2) (12 for single precision)
//   N+3     pack, followed by the output register
// Base 4, the precomputed multiples and the latency follow the described unit.
// The split into stages is this design's own choice. Rounding is toward zero.
// Subnormals read and write as zero. INF and NaN follow IEEE-754: x/0 = INF,
// 0/0 = INF/INF = NaN, and x/INF = 0. Overflow gives INF.
// Interface: o1 port register, t1 trigger, result on r1data held until the next
// one. glock stalls the unit, and rstx is an active-low asynchronous reset.
module fpu_sp_div #(
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
  input  logic [dataw-1:0] o1data,
  input  logic             o1load,
  output logic [busw-1:0]  r1data
);
  localparam int unsigned W    = mw + ew + 1;
  localparam int unsigned NIT  = (mw + 1) / 2;
  localparam int unsigned QW   = 2 * NIT + 1;          // quotient bits incl. integer bit
  localparam int unsigned RW   = mw + 4;               // remainder width
  localparam logic [ew-1:0] EMAX = '1;
  localparam int signed   BIAS = (1 << (ew - 1)) - 1;

  typedef enum logic [1:0] {K_NUM = 2'd0, K_ZERO = 2'd1, K_INF = 2'd2, K_NAN = 2'd3} kind_e;

  typedef struct packed {
    logic                 s;
    kind_e                kind;
    logic signed [ew+1:0] e;
    logic [RW-1:0]        d1, d2, d3;
    logic [RW-1:0]        r;
    logic [QW-1:0]        q;
  } st_t;

  logic [dataw-1:0] o1q;
  logic             v1;
  logic [2*W-1:0]   s1;

  initial assert (dataw >= W && busw >= W);

  fu_operand_reg #(.W(dataw)) u_o1 (.clk, .rstx, .glock, .load(o1load), .data(o1data), .q(o1q));

  fu_pipe_stage #(.W(2*W)) u_sh (
    .clk, .rstx, .glock, .vin(t1load), .din({t1data[W-1:0], o1q[W-1:0]}), .vout(v1), .dout(s1)
  );

  // Stage 2: unpack and set up the iteration.
  st_t pre;
  always_comb begin
    logic [W-1:0]  a, b;
    logic          az, bz, ai, bi, an, bn, lt;
    logic [RW-1:0] ma, mb, x;
    a  = s1[2*W-1:W];
    b  = s1[W-1:0];
    az = (a[W-2:mw] == '0);
    bz = (b[W-2:mw] == '0);
    ai = (a[W-2:mw] == EMAX) && (a[mw-1:0] == '0);
    bi = (b[W-2:mw] == EMAX) && (b[mw-1:0] == '0);
    an = (a[W-2:mw] == EMAX) && (a[mw-1:0] != '0);
    bn = (b[W-2:mw] == EMAX) && (b[mw-1:0] != '0);
    ma = RW'({1'b1, a[mw-1:0]});
    mb = RW'({1'b1, b[mw-1:0]});
    lt = (ma < mb);
    x  = lt ? (ma << 1) : ma;
    pre.s    = a[W-1] ^ b[W-1];
    if (an || bn || (az && bz) || (ai && bi)) pre.kind = K_NAN;
    else if (ai || bz)                        pre.kind = K_INF;
    else if (az || bi)                        pre.kind = K_ZERO;
    else                                      pre.kind = K_NUM;
    pre.e  = $signed((ew+2)'(a[W-2:mw])) - $signed((ew+2)'(b[W-2:mw]))
             + $signed((ew+2)'(BIAS)) - $signed((ew+2)'(lt));
    pre.d1 = mb;
    pre.d2 = mb << 1;
    pre.d3 = mb + (mb << 1);
    pre.r  = x - mb;                    // integer quotient bit is always 1
    pre.q  = QW'(1);
  end

  st_t stg [NIT+1];
  logic vst [NIT+1];

  fu_pipe_stage #(.W($bits(st_t))) u_pre (
    .clk, .rstx, .glock, .vin(v1), .din(pre), .vout(vst[0]), .dout(stg[0])
  );

  // Stages 3..NIT+2: one base-4 digit each.
  for (genvar i = 0; i < NIT; i++) begin : g_it
    st_t nxt;
    always_comb begin
      logic [RW-1:0] r4, t1, t2, t3;
      logic          ge1, ge2, ge3;
      nxt = stg[i];
      r4  = stg[i].r << 2;
      ge3 = (r4 >= stg[i].d3);
      ge2 = (r4 >= stg[i].d2);
      ge1 = (r4 >= stg[i].d1);
      t3  = r4 - stg[i].d3;
      t2  = r4 - stg[i].d2;
      t1  = r4 - stg[i].d1;
      if (ge3)      begin nxt.r = t3; nxt.q = {stg[i].q[QW-3:0], 2'd3}; end
      else if (ge2) begin nxt.r = t2; nxt.q = {stg[i].q[QW-3:0], 2'd2}; end
      else if (ge1) begin nxt.r = t1; nxt.q = {stg[i].q[QW-3:0], 2'd1}; end
      else          begin nxt.r = r4; nxt.q = {stg[i].q[QW-3:0], 2'd0}; end
    end
    fu_pipe_stage #(.W($bits(st_t))) u_it (
      .clk, .rstx, .glock, .vin(vst[i]), .din(nxt), .vout(vst[i+1]), .dout(stg[i+1])
    );
  end

  // Last stage: pack the quotient, then the output register.
  logic [W-1:0] y, r;
  always_comb begin
    st_t f;
    f = stg[NIT];
    unique case (f.kind)
      K_NAN:  y = {1'b0, EMAX, 1'b1, {(mw-1){1'b0}}};
      K_INF:  y = {f.s, EMAX, {mw{1'b0}}};
      K_ZERO: y = {f.s, {(W-1){1'b0}}};
      default: begin
        if (f.e <= 0)                                y = {f.s, {(W-1){1'b0}}};
        else if (f.e >= $signed((ew+2)'(EMAX)))      y = {f.s, EMAX, {mw{1'b0}}};
        else                                         y = {f.s, f.e[ew-1:0], f.q[QW-2 -: mw]};
      end
    endcase
  end

  fu_pipe_stage #(.W(W)) u_out (
    .clk, .rstx, .glock, .vin(vst[NIT]), .din(y), .vout(), .dout(r)
  );

  assign r1data = busw'(r);
endmodule
