// invsqrth: half-precision inverse square root function unit, y ~ 1/sqrt(t1).
// Latency 5.
//
// One Newton step, y1 = y0 * (1.5 - 0.5 * x * y0^2), refines a starting guess
// y0. The guess is the classic integer trick on the half-precision bit pattern,
// y0 = magic - (x >> 1). The step runs in fixed point on the unpacked
// significands:
//   register 1  shadow register of x
//   stage 2     guess y0, special cases, and my*my
//   stage 3     t = mx * my^2, with exponent k, so that x*y0^2 = t * 2^k
//   stage 4     v = 1.5 - t * 2^(k-1)
//   stage 5     y1 = my * v, normalized and packed into the output register
// The single Newton iteration and the latency follow the described unit. The
// starting guess and the fixed-point widths are this design's own choices. The
// result is within about 0.2 % of the exact value. Special inputs: +INF gives
// +0, +-0 (and subnormals) give +-INF, and negative numbers and NaN give NaN.
// Operand and result are the low 16 bits of t1data and r1data. glock stalls the
// unit, and rstx is an active-low asynchronous reset.
module invsqrth #(
  parameter int unsigned     dataw = 16,
  parameter int unsigned     busw  = 16,
  parameter logic [15:0]     magic = 16'h59BA
) (
  input  logic             clk,
  input  logic             rstx,
  input  logic             glock,
  input  logic [dataw-1:0] t1data,
  input  logic             t1load,
  output logic [busw-1:0]  r1data
);
  localparam int unsigned MW = 10;
  localparam int unsigned EW = 5;
  localparam logic [EW-1:0] EMAX = '1;

  typedef enum logic [1:0] {K_NUM = 2'd0, K_ZERO = 2'd1, K_INF = 2'd2, K_NAN = 2'd3} kind_e;

  typedef struct packed {
    kind_e        kind;
    logic         ks;
    logic [4:0]   ex, ey;
    logic [10:0]  mx, my;
    logic [21:0]  sq;       // my^2, 20 fraction bits
  } s2_t;

  typedef struct packed {
    kind_e             kind;
    logic              ks;
    logic [4:0]        ey;
    logic [10:0]       my;
    logic signed [7:0] k;
    logic [32:0]       t;   // mx*my^2, 30 fraction bits
  } s3_t;

  typedef struct packed {
    kind_e       kind;
    logic        ks;
    logic [4:0]  ey;
    logic [10:0] my;
    logic [32:0] v;         // 1.5 - x*y0^2/2, 30 fraction bits
  } s4_t;

  localparam logic [34:0] THREE_HALVES = 35'h0_6000_0000;   // 1.5 * 2^30

  initial assert (dataw >= 16 && busw >= 16);

  logic        v1;
  logic [15:0] s1;
  fu_pipe_stage #(.W(16)) u_r1 (.clk, .rstx, .glock, .vin(t1load), .din(t1data[15:0]), .vout(v1), .dout(s1));

  s2_t n2;
  always_comb begin
    logic [15:0] y0;
    y0     = magic - {1'b0, s1[15:1]};
    n2.ex  = s1[14:10];
    n2.ey  = y0[14:10];
    n2.mx  = {1'b1, s1[9:0]};
    n2.my  = {1'b1, y0[9:0]};
    n2.sq  = 22'(n2.my) * 22'(n2.my);
    n2.ks  = 1'b0;
    if ((s1[14:10] == EMAX && s1[9:0] != '0) || (s1[15] && s1[14:10] != '0)) n2.kind = K_NAN;
    else if (s1[14:10] == '0)   begin n2.kind = K_INF; n2.ks = s1[15]; end
    else if (s1[14:10] == EMAX)       n2.kind = K_ZERO;
    else                              n2.kind = K_NUM;
  end

  logic v2; s2_t q2;
  fu_pipe_stage #(.W($bits(s2_t))) u_r2 (.clk, .rstx, .glock, .vin(v1), .din(n2), .vout(v2), .dout(q2));

  s3_t n3;
  always_comb begin
    n3.kind = q2.kind;
    n3.ks   = q2.ks;
    n3.ey   = q2.ey;
    n3.my   = q2.my;
    n3.t    = 33'(q2.mx) * 33'(q2.sq);
    n3.k    = $signed({3'b000, q2.ex}) + $signed({2'b00, q2.ey, 1'b0}) - 8'sd45;
  end

  logic v3; s3_t q3;
  fu_pipe_stage #(.W($bits(s3_t))) u_r3 (.clk, .rstx, .glock, .vin(v2), .din(n3), .vout(v3), .dout(q3));

  s4_t n4;
  always_comb begin
    logic [34:0]       h;
    logic signed [7:0] sh;
    sh = q3.k - 8'sd1;
    if (sh > 8'sd1)       h = '1;
    else if (sh >= 0)     h = 35'(q3.t) << sh;
    else if (sh < -8'sd34) h = '0;
    else                  h = 35'(q3.t) >> (-sh);
    n4.kind = q3.kind;
    n4.ks   = q3.ks;
    n4.ey   = q3.ey;
    n4.my   = q3.my;
    n4.v    = (h >= THREE_HALVES) ? '0 : 33'(THREE_HALVES - h);
  end

  logic v4; s4_t q4;
  fu_pipe_stage #(.W($bits(s4_t))) u_r4 (.clk, .rstx, .glock, .vin(v3), .din(n4), .vout(v4), .dout(q4));

  logic [15:0] y, r;
  always_comb begin
    logic [43:0]       p;          // my * v, 40 fraction bits
    logic [5:0]        pos;
    logic signed [7:0] e;
    logic [43:0]       n;
    p   = 44'(q4.my) * 44'(q4.v);
    pos = '0;
    for (int i = 0; i < 44; i++) if (p[i]) pos = 6'(i);
    n   = p << (6'd43 - pos);
    e   = $signed({3'b000, q4.ey}) + $signed({2'b00, pos}) - 8'sd40;
    unique case (q4.kind)
      K_NAN:  y = {1'b0, EMAX, 1'b1, 9'd0};
      K_INF:  y = {q4.ks, EMAX, 10'd0};
      K_ZERO: y = 16'd0;
      default: begin
        if (p == '0 || e <= 0)  y = 16'd0;
        else if (e >= 8'sd31)   y = {1'b0, EMAX, 10'd0};
        else                    y = {1'b0, e[4:0], n[42 -: MW]};
      end
    endcase
  end

  fu_pipe_stage #(.W(16)) u_r5 (.clk, .rstx, .glock, .vin(v4), .din(y), .vout(), .dout(r));

  assign r1data = busw'(r);
endmodule
