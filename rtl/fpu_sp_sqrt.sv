// fpu_sp_sqrt: single-precision floating-point square-root function unit.
// One operation, SQRTF (of t1). Latency mw + 3, which is 26 for single precision.
//
// The significand root is produced one bit per pipeline stage, starting from
// the most significant bit. Each stage shifts the next two radicand bits into
// the partial remainder r. It then compares r with the trial value 4q + 1 (q is
// the root so far) and either subtracts it and appends a 1, or appends a 0. The
// critical path of a stage is one subtractor and one multiplexer. This is the
// bit-serial (Hain-style) square rooter of the described unit, with its
// auxiliary variables kept as the remainder and the shifted radicand. The stages:
//   1        shadow register of the operand (captured on trigger)
//   2        unpack, special cases, halve the exponent, and shift the
//            significand left by one when the exponent is odd. The first
//            root bit is always 1.
//   3..mw+2  one root bit each (23 stages for single precision)
//   mw+3     pack, followed by the output register
// The one-bit-per-stage structure and the latency follow the described unit.
// The exact stage split is this design's own choice. Rounding is toward zero,
// and subnormals read and write as zero. sqrt(-0) = -0, sqrt(+INF) = +INF, and
// the root of a negative number or NaN is NaN.
// Interface: t1 triggers, the result is on r1data and held until the next one.
// glock stalls the unit, and rstx is an active-low asynchronous reset.
module fpu_sp_sqrt #(
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
  output logic [busw-1:0]  r1data
);
  localparam int unsigned W    = mw + ew + 1;
  localparam int unsigned RW   = mw + 4;
  localparam logic [ew-1:0] EMAX = '1;
  localparam int signed   BIAS = (1 << (ew - 1)) - 1;

  typedef enum logic [1:0] {K_NUM = 2'd0, K_ZERO = 2'd1, K_INF = 2'd2, K_NAN = 2'd3} kind_e;

  typedef struct packed {
    logic            s;
    kind_e           kind;
    logic [ew-1:0]   e;
    logic [2*mw-1:0] n;      // radicand bits still to be consumed, MSBs first
    logic [RW-1:0]   r;
    logic [mw:0]     q;
  } st_t;

  logic         v1;
  logic [W-1:0] s1;

  initial assert (dataw >= W && busw >= W);

  fu_pipe_stage #(.W(W)) u_sh (
    .clk, .rstx, .glock, .vin(t1load), .din(t1data[W-1:0]), .vout(v1), .dout(s1)
  );

  st_t pre;
  always_comb begin
    logic signed [ew+1:0] eu, eh;
    logic [2*mw+1:0]      rad;
    logic                 z, inf, nan;
    z   = (s1[W-2:mw] == '0);
    inf = (s1[W-2:mw] == EMAX) && (s1[mw-1:0] == '0);
    nan = (s1[W-2:mw] == EMAX) && (s1[mw-1:0] != '0);
    eu  = $signed((ew+2)'(s1[W-2:mw])) - $signed((ew+2)'(BIAS));
    eh  = eu >>> 1;                         // floor(eu / 2)
    // Radicand 1.f (or 2 * 1.f for odd exponents) with 2*mw fraction bits.
    rad = eu[0] ? {1'b1, s1[mw-1:0], {(mw+1){1'b0}}} : {1'b0, 1'b1, s1[mw-1:0], {mw{1'b0}}};
    pre.s = s1[W-1];
    if (nan || (s1[W-1] && !z)) pre.kind = K_NAN;
    else if (z)                 pre.kind = K_ZERO;
    else if (inf)               pre.kind = K_INF;
    else                        pre.kind = K_NUM;
    pre.e = ew'(eh + $signed((ew+2)'(BIAS)));
    pre.n = rad[2*mw-1:0];
    pre.r = RW'(rad[2*mw+1:2*mw]) - RW'(1);
    pre.q = (mw+1)'(1);
  end

  st_t  stg [mw+1];
  logic vst [mw+1];

  fu_pipe_stage #(.W($bits(st_t))) u_pre (
    .clk, .rstx, .glock, .vin(v1), .din(pre), .vout(vst[0]), .dout(stg[0])
  );

  for (genvar i = 0; i < mw; i++) begin : g_it
    st_t nxt;
    always_comb begin
      logic [RW-1:0] rr, t;
      nxt   = stg[i];
      rr    = {stg[i].r[RW-3:0], stg[i].n[2*mw-1 -: 2]};
      t     = {stg[i].q, 2'b01};
      nxt.n = stg[i].n << 2;
      if (rr >= t) begin
        nxt.r = rr - t;
        nxt.q = {stg[i].q[mw-1:0], 1'b1};
      end else begin
        nxt.r = rr;
        nxt.q = {stg[i].q[mw-1:0], 1'b0};
      end
    end
    fu_pipe_stage #(.W($bits(st_t))) u_it (
      .clk, .rstx, .glock, .vin(vst[i]), .din(nxt), .vout(vst[i+1]), .dout(stg[i+1])
    );
  end

  logic [W-1:0] y, r;
  always_comb begin
    st_t f;
    f = stg[mw];
    unique case (f.kind)
      K_NAN:   y = {1'b0, EMAX, 1'b1, {(mw-1){1'b0}}};
      K_INF:   y = {1'b0, EMAX, {mw{1'b0}}};
      K_ZERO:  y = {f.s, {(W-1){1'b0}}};
      default: y = {1'b0, f.e, f.q[mw-1:0]};
    endcase
  end

  fu_pipe_stage #(.W(W)) u_out (
    .clk, .rstx, .glock, .vin(vst[mw]), .din(y), .vout(), .dout(r)
  );

  assign r1data = busw'(r);
endmodule
