// tb_fpu_suite: end-to-end self-checking testbench of the whole unit suite at
// its default parameters.
//
// Every unit is driven through fpu_suite's ports the way a transport-triggered
// processor would move data: operand moves, then a trigger move, then a read of
// the result register after the unit's latency. Each named mechanism below is
// counted, and the run fails if any count stays zero:
//   latency    every unit's result appears exactly `latency` edges after the
//              trigger edge (checked as not-yet-there one edge earlier)
//   pipeline   back-to-back random streams on add, mul, div, sqrt and FMA in
//              parallel, checked against double-precision references
//   divalg     the DivideFast, DivideMedium and DivideSlow software divisions
//              on the accelerator (INITDIV, RECIPA, MULP2) and the fused
//              multiply-adder: within 4, 2 and 2 ulp, in the documented cycle
//              counts (21, 27 and 39 with two FMA units; here one FMA unit
//              runs each pair of independent operations one cycle apart,
//              adding 2, 1 and 1 cycles)
//   sqrtalg    the software square root on INITSQRT, RSQRTA, MULP2 and the
//              FMA: within 2 ulp, 33 cycles with two FMA units (35 here)
//   stall      glock raised while operations are in flight delays their
//              results by exactly the stalled cycles
//   opreg      an operand moved cycles before the trigger is used from the
//              port register
//   forward    an operand moved in the trigger cycle overrides the register
//   hold       result registers keep their value while other units work
//   overflow   results too large become INF, integer conversion saturates
//   specials   NaN and INF generation and propagation, subnormal flush to zero
//   halfswap   the half comparator's NEGH/NEH codes (6 and 7)
//   half       half-precision add, mul, FMA, inverse square root, conversion
// A watchdog ends a hung run.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpu_suite;
  import fp_ref_pkg::*;
  import fpu_pkg::*;

  localparam int LAT [NUM_FU] = '{5, 5, 15, 26, 1, 4, 6, 1, 2, 2, 5, 1, 1, 6};
  localparam logic [31:0] ONE = 32'h3f800000, HALF = 32'h3f000000;

  logic clk = 0, rstx = 0, glock = 0;
  fu_req_t req [NUM_FU];
  logic [31:0] r1 [NUM_FU];
  logic [31:0] acc_r2, acc_r3;
  int checks = 0, failures = 0;

  typedef enum int {M_LAT, M_PIPE, M_DIVALG, M_SQRTALG, M_STALL, M_OPREG, M_FWD, M_HOLD,
                    M_OVF, M_SPEC, M_HSWAP, M_HALF, M_N} mech_e;
  int mech [M_N];
  string mname [M_N] = '{"latency", "pipeline", "divalg", "sqrtalg", "stall", "opreg", "forward",
                         "hold", "overflow", "specials", "halfswap", "half"};

  fpu_suite dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit same(logic [31:0] got, logic [31:0] exp, int mw = 23, int ew = 8);
    return is_nan(exp, mw, ew) ? is_nan(got, mw, ew) : (got === exp);
  endfunction

  task automatic check(bit ok, mech_e m, string what);
    checks++;
    mech[m]++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%s] %s", mname[m], what);
    end
  endtask

  task automatic idle_all();
    for (int u = 0; u < NUM_FU; u++) begin
      req[u].t1load = 0; req[u].o1load = 0; req[u].o2load = 0;
    end
  endtask

  // One operation on unit u, waiting for its result. Also checks the latency:
  // one edge before the result is due the register must still show `old`
  // (callers choose operands so the new result differs).
  task automatic op(int u, int opc, logic [31:0] a, logic [31:0] b, logic [31:0] c,
                    output logic [31:0] y);
    logic [31:0] old;
    @(negedge clk);
    old = r1[u];
    req[u].t1data = a; req[u].o1data = b; req[u].o2data = c; req[u].t1opcode = 3'(opc);
    req[u].t1load = 1; req[u].o1load = 1; req[u].o2load = 1;
    @(posedge clk);
    #1 idle_all();
    if (LAT[u] > 1) begin
      repeat (LAT[u] - 2) @(posedge clk);
      #1 y = r1[u];
      @(posedge clk);
      #1 if (r1[u] != y) check(y == old, M_LAT, $sformatf("unit %0d early result", u));
    end
    y = r1[u];
  endtask

  function automatic logic [31:0] ref_div(logic [31:0] a, logic [31:0] b);
    if (is_nan(a, 23, 8) || is_nan(b, 23, 8) || (is_zero(a, 23, 8) && is_zero(b, 23, 8)) ||
        (is_inf(a, 23, 8) && is_inf(b, 23, 8))) return 32'h7fc00000;
    if (is_inf(a, 23, 8) || is_zero(b, 23, 8)) return inf(a[31] ^ b[31], 23, 8);
    if (is_zero(a, 23, 8) || is_inf(b, 23, 8)) return {a[31] ^ b[31], 31'd0};
    return from_real(to_real(a, 23, 8) / to_real(b, 23, 8), 23, 8);
  endfunction

  // ---------------------------------------------------------------- algorithms
  // Two independent FMA operations issued on consecutive edges; results are
  // read as each appears (the result register holds only the latest one).
  task automatic fma2(int op1, logic [31:0] a1, logic [31:0] b1, logic [31:0] c1,
                      int op2, logic [31:0] a2, logic [31:0] b2, logic [31:0] c2,
                      output logic [31:0] y1, output logic [31:0] y2);
    @(negedge clk);
    req[FU_MAC].t1data = a1; req[FU_MAC].o1data = b1; req[FU_MAC].o2data = c1;
    req[FU_MAC].t1opcode = 3'(op1);
    req[FU_MAC].t1load = 1; req[FU_MAC].o1load = 1; req[FU_MAC].o2load = 1;
    @(posedge clk);
    #1 req[FU_MAC].t1data = a2; req[FU_MAC].o1data = b2; req[FU_MAC].o2data = c2;
    req[FU_MAC].t1opcode = 3'(op2);
    @(posedge clk);
    #1 idle_all();
    repeat (LAT[FU_MAC] - 2) @(posedge clk);
    #1 y1 = r1[FU_MAC];
    @(posedge clk);
    #1 y2 = r1[FU_MAC];
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  int max_ulp [4] = '{0, 0, 0, 0};   // DivideMedium, DivideSlow, square root, DivideFast
  localparam int ULP_BOUND [4] = '{2, 2, 2, 4};

  // Score one software result against the truncated reference; the error
  // bound is 2 ulp, and `lat` is the cycle count the document gives for
  // two FMA units plus one cycle per pair of operations sharing one FMA here.
  task automatic score(logic [31:0] res, logic [31:0] t, int t0, int lat, mech_e m, int alg,
                       string what);
    int u;
    u = (is_nan(t, 23, 8) || is_inf(t, 23, 8) || is_zero(t, 23, 8)) ? 0 : ulp_diff(res, t, 23, 8);
    if (u > max_ulp[alg]) max_ulp[alg] = u;
    check(is_nan(t, 23, 8) ? is_nan(res, 23, 8) :
          (is_inf(t, 23, 8) || is_zero(t, 23, 8)) ? res == t : u <= ULP_BOUND[alg],
          m, $sformatf("%s: got %h expected %h", what, res, t));
    check(cyc - t0 + 1 == lat, m, $sformatf("%s: %0d cycles, expected %0d", what, cyc - t0 + 1, lat));
  endtask

  // DivideFast: two Goldschmidt steps on the quotient (not OpenCL EP exact;
  // the document observed up to 4 ulp).
  task automatic divide_fast(logic [31:0] a, logic [31:0] b);
    logic [31:0] ap, bp, c, y, e, e1, q, res, t;
    int t0;
    @(posedge clk);
    #1 t0 = cyc + 1;
    op(FU_ACC, ACC_INITDIV, a, b, 0, t);
    ap = r1[FU_ACC]; bp = acc_r2; c = acc_r3;
    op(FU_ACC, ACC_RECIPA, b, 0, 0, y);
    fma2(MAC_MUL, ap, y, 0, MAC_MSU, ONE, bp, y, q, e);   // q0 = a'y, e = 1 - b'y
    fma2(MAC_MAC, q, q, e, MAC_MUL, e, e, 0, q, e1);       // q1 = q0 e + q0, e1 = e e
    op(FU_MAC, MAC_MAC, q, q, e1, q);                      // q2 = q1 e1 + q1
    op(FU_ACC, ACC_MULP2, q, c, 0, res);
    score(res, ref_div(a, b), t0, 21 + 2, M_DIVALG, 3, $sformatf("fast %h / %h", a, b));
  endtask

  // DivideMedium: one Newton step on the quotient, then a remainder correction.
  task automatic divide_medium(logic [31:0] a, logic [31:0] b);
    logic [31:0] ap, bp, c, y, e, q, r, res, t;
    int t0;
    @(posedge clk);
    #1 t0 = cyc + 1;
    op(FU_ACC, ACC_INITDIV, a, b, 0, t);
    ap = r1[FU_ACC]; bp = acc_r2; c = acc_r3;
    op(FU_ACC, ACC_RECIPA, b, 0, 0, y);
    fma2(MAC_MUL, ap, y, 0, MAC_MSU, ONE, bp, y, q, e);   // q0 = a'y, e = 1 - b'y
    op(FU_MAC, MAC_MAC, q, q, e, q);                       // q1 = q0 e + q0
    op(FU_MAC, MAC_MSU, ap, bp, q, r);                     // r = a' - b' q1
    op(FU_MAC, MAC_MAC, q, r, y, q);                       // Q = r y + q1
    op(FU_ACC, ACC_MULP2, q, c, 0, res);                   // Q' = Q * c
    score(res, ref_div(a, b), t0, 27 + 1, M_DIVALG, 0, $sformatf("medium %h / %h", a, b));
  endtask

  // DivideSlow: Goldschmidt refinement of 1/b', then a Newton step on a/b.
  task automatic divide_slow(logic [31:0] a, logic [31:0] b);
    logic [31:0] ap, bp, c, y, e, e1, q, r, res, t;
    int t0;
    @(posedge clk);
    #1 t0 = cyc + 1;
    op(FU_ACC, ACC_INITDIV, a, b, 0, t);
    ap = r1[FU_ACC]; bp = acc_r2; c = acc_r3;
    op(FU_ACC, ACC_RECIPA, b, 0, 0, y);
    op(FU_MAC, MAC_MSU, ONE, bp, y, e);                    // e = 1 - b' y0
    fma2(MAC_MAC, y, y, e, MAC_MUL, e, e, 0, y, e1);       // y1 = y0 e + y0, e1 = e e
    op(FU_MAC, MAC_MAC, y, y, e1, y);                      // y2 = y1 e1 + y1
    op(FU_MAC, MAC_MUL, ap, y, 0, q);                      // q = a' y2
    op(FU_MAC, MAC_MSU, ap, bp, q, r);                     // r = a' - b' q
    op(FU_MAC, MAC_MAC, q, r, y, q);                       // Q = r y2 + q
    op(FU_ACC, ACC_MULP2, q, c, 0, res);
    score(res, ref_div(a, b), t0, 39 + 1, M_DIVALG, 1, $sformatf("slow %h / %h", a, b));
  endtask

  // Square root: one Goldschmidt step on g ~ sqrt(b'), h ~ 1/(2 sqrt(b')),
  // then a final correction of g.
  task automatic square_root(logic [31:0] b);
    logic [31:0] bp, c, y, g, h, r, d, res, t;
    int t0;
    @(posedge clk);
    #1 t0 = cyc + 1;
    op(FU_ACC, ACC_INITSQRT, b, 0, 0, bp);
    c = acc_r3;
    op(FU_ACC, ACC_RSQRTA, b, 0, 0, y);
    fma2(MAC_MUL, bp, y, 0, MAC_MUL, HALF, y, 0, g, h);    // g = b' y, h = y / 2
    op(FU_MAC, MAC_MSU, HALF, h, g, r);                    // r = 1/2 - h g
    fma2(MAC_MAC, g, g, r, MAC_MAC, h, h, r, g, h);        // g1 = g r + g, h1 = h r + h
    op(FU_MAC, MAC_MSU, bp, g, g, d);                      // d = b' - g1 g1
    op(FU_MAC, MAC_MAC, g, h, d, g);                       // g2 = h1 d + g1
    op(FU_ACC, ACC_MULP2, g, c, 0, res);
    t = (b[31] && !is_zero(b, 23, 8)) || is_nan(b, 23, 8) ? 32'h7fc00000 :
        (is_zero(b, 23, 8) || is_inf(b, 23, 8)) ? b : from_real($sqrt(to_real(b, 23, 8)), 23, 8);
    score(res, t, t0, 33 + 2, M_SQRTALG, 2, $sformatf("sqrt %h", b));
  endtask

  // ------------------------------------------------------------------ pipeline
  // Called at a trigger edge: checks unit u's result register latency-1 edges
  // later, in its own thread.
  task automatic pipe_check(int u, logic [31:0] exp, string what);
    fork
      begin
        repeat (LAT[u] - 1) @(posedge clk);
        #1 check(same(r1[u], exp), M_PIPE, $sformatf("%s: got %h expected %h", what, r1[u], exp));
      end
    join_none
  endtask

  // Random back-to-back stream on five units at once.
  task automatic pipeline(int n);
    for (int k = 0; k < n; k++) begin
      logic [31:0] a, b, c, ea, em, ed, es, ef;
      int e;
      bit add_ok;
      a = rnd(-60, 60, 23, 8); b = rnd(-60, 60, 23, 8);
      e = fexp(a, 23, 8) - 127 + fexp(b, 23, 8) - 127;
      c = rnd(e - 20, e + 4, 23, 8);
      // the double sum is exact only for close exponents
      add_ok = fexp(a, 23, 8) - fexp(b, 23, 8) < 28 && fexp(b, 23, 8) - fexp(a, 23, 8) < 28;
      ea = from_real(to_real(a, 23, 8) + to_real(b, 23, 8), 23, 8);
      em = from_real(to_real(a, 23, 8) * to_real(b, 23, 8), 23, 8);
      ed = ref_div(a, b);
      es = from_real($sqrt(to_real(a & 32'h7fffffff, 23, 8)), 23, 8);
      ef = from_real(to_real(c, 23, 8) + to_real(a, 23, 8) * to_real(b, 23, 8), 23, 8);
      @(negedge clk);
      foreach (req[u]) begin
        req[u].t1data = a; req[u].o1data = b; req[u].t1opcode = 0;
        req[u].t1load = 0; req[u].o1load = 1; req[u].o2load = 1;
      end
      req[FU_SQRT].t1data = a & 32'h7fffffff;
      req[FU_MAC].t1data = c; req[FU_MAC].o1data = a; req[FU_MAC].o2data = b;
      req[FU_MAC].t1opcode = 3'(MAC_MAC);
      req[FU_ADD].t1load = 1; req[FU_MUL].t1load = 1; req[FU_DIV].t1load = 1;
      req[FU_SQRT].t1load = 1; req[FU_MAC].t1load = 1;
      @(posedge clk);
      if (add_ok) pipe_check(FU_ADD, ea, $sformatf("add %h %h", a, b));
      pipe_check(FU_MUL, em, $sformatf("mul %h %h", a, b));
      pipe_check(FU_DIV, ed, $sformatf("div %h %h", a, b));
      pipe_check(FU_SQRT, es, $sformatf("sqrt %h", a & 32'h7fffffff));
      pipe_check(FU_MAC, ef, $sformatf("fma %h %h %h", c, a, b));
    end
    @(negedge clk) idle_all();
    repeat (LAT[FU_SQRT] + 1) @(posedge clk);
  endtask

  initial begin
    logic [31:0] y, y2, h1, h2;
    foreach (req[u]) req[u] = '0;
    foreach (mech[m]) mech[m] = 0;
    repeat (3) @(posedge clk);
    rstx = 1;

    // latency of every unit: an operation whose result differs from reset 0
    op(FU_ADD,  OP_ADD, ONE, ONE, 0, y);           check(y == 32'h40000000, M_LAT, "add latency");
    op(FU_MUL,  0, 32'h40000000, 32'h40400000, 0, y); check(y == 32'h40c00000, M_LAT, "mul latency");
    op(FU_DIV,  0, 32'h40c00000, 32'h40000000, 0, y); check(y == 32'h40400000, M_LAT, "div latency");
    op(FU_SQRT, 0, 32'h41100000, 0, 0, y);          check(y == 32'h40400000, M_LAT, "sqrt latency");
    op(FU_CMP,  CMP_LT, ONE, 32'h40000000, 0, y);   check(y == 1, M_LAT, "cmp latency");
    op(FU_CONV, CVT_CFI, 32'h42f60000, 0, 0, y);    check(y == 123, M_LAT, "conv latency");
    op(FU_MAC,  MAC_MAC, ONE, 32'h40000000, 32'h40400000, y); check(y == 32'h40e00000, M_LAT, "fma latency");
    op(FU_ACC,  ACC_RECIPA, 32'h40000000, 0, 0, y); check(y[30:23] == 126, M_LAT, "accel latency");
    op(FU_HADD, OP_ADD, 32'h3c00, 32'h3c00, 0, y);  check(y == 32'h4000, M_HALF, "hadd");
    op(FU_HMUL, 0, 32'h4000, 32'h4200, 0, y);       check(y == 32'h4600, M_HALF, "hmul");
    op(FU_HISQ, 0, 32'h4400, 0, 0, y);              check(y >= 32'h37f8 && y <= 32'h3804, M_HALF, "invsqrth 1/sqrt(4)");
    op(FU_FH,   FH_CFH, 32'h40400000, 0, 0, y);     check(y == 32'h4200, M_HALF, "cfh");
    op(FU_FH,   FH_CHF, 32'h4200, 0, 0, y);         check(y == 32'h40400000, M_HALF, "chf");
    op(FU_HCMP, CMP_GT, 32'h4200, 32'h3c00, 0, y);  check(y == 1, M_HALF, "hcmp gt");
    op(FU_HMAC, MAC_MAC, 32'h3c00, 32'h4000, 32'h4200, y); check(y == 32'h4700, M_HALF, "hfma 1+2*3");
    op(FU_HMAC, MAC_SUB, 32'h4700, 32'h3c00, 0, y); check(y == 32'h4600, M_HALF, "hfma sub");

    // half comparator opcode swap
    op(FU_HCMP, HCMP_NEG, 32'h3c00, 0, 0, y);       check(y == 32'hbc00, M_HSWAP, "NEGH is code 6");
    op(FU_HCMP, HCMP_NE, 32'h3c00, 32'h4000, 0, y); check(y == 1, M_HSWAP, "NEH is code 7");
    op(FU_HCMP, HCMP_NE, 32'h3c00, 32'h3c00, 0, y); check(y == 0, M_HSWAP, "NEH equal");
    op(FU_CMP,  CMP_NEG, ONE, 0, 0, y);             check(y == 32'hbf800000, M_HSWAP, "NEGF is code 7");

    // overflow
    op(FU_MUL,  0, 32'h7f000000, 32'h40000000, 0, y); check(y == 32'h7f800000, M_OVF, "mul overflow");
    op(FU_ADD,  OP_ADD, 32'hff7fffff, 32'hff7fffff, 0, y); check(y == 32'hff800000, M_OVF, "add overflow");
    op(FU_DIV,  0, 32'h7f000000, 32'h00800000, 0, y); check(y == 32'h7f800000, M_OVF, "div overflow");
    op(FU_MAC,  MAC_MAC, 32'h7f7fffff, 32'h7f7fffff, ONE, y); check(y == 32'h7f800000, M_OVF, "fma overflow");
    op(FU_CONV, CVT_CFI, 32'h5f000000, 0, 0, y);    check(y == 32'h7fffffff, M_OVF, "cfi saturates");
    op(FU_HMUL, 0, 32'h7800, 32'h7800, 0, y);       check(y == 32'h7c00, M_OVF, "hmul overflow");
    op(FU_FH,   FH_CFH, 32'h48000000, 0, 0, y);     check(y == 32'h7c00, M_OVF, "cfh overflow");

    // specials
    op(FU_DIV,  0, ONE, 32'h80000000, 0, y);        check(y == 32'hff800000, M_SPEC, "1/-0");
    op(FU_DIV,  0, 0, 0, 0, y);                     check(is_nan(y, 23, 8), M_SPEC, "0/0");
    op(FU_SQRT, 0, 32'hbf800000, 0, 0, y);          check(y == 32'h7fc00000, M_SPEC, "sqrt(-1)");
    op(FU_SQRT, 0, 32'h80000000, 0, 0, y);          check(y == 32'h80000000, M_SPEC, "sqrt(-0)");
    op(FU_ADD,  OP_SUB, 32'h7f800000, 32'h7f800000, 0, y); check(y == 32'h7fc00000, M_SPEC, "INF-INF");
    op(FU_MUL,  0, 32'h7fc00001, ONE, 0, y);        check(y == 32'h7fc00000, M_SPEC, "NaN propagates canonical");
    op(FU_MUL,  0, 32'h00400000, 32'h7f000000, 0, y); check(y == 0, M_SPEC, "subnormal input flushed");
    op(FU_MUL,  0, 32'h00800000, HALF, 0, y);       check(y == 0, M_SPEC, "subnormal result flushed");
    op(FU_MAC,  MAC_MAC, ONE, 32'h7f800000, 0, y);  check(y == 32'h7fc00000, M_SPEC, "fma INF*0");
    op(FU_CMP,  CMP_EQ, 32'h7fc00000, 32'h7fc00000, 0, y); check(y == 0, M_SPEC, "NaN unordered");
    op(FU_HADD, OP_ADD, 32'h7c00, 32'hfc00, 0, y);  check(y == 32'h7e00, M_SPEC, "half INF-INF");
    op(FU_HISQ, 0, 32'h0000, 0, 0, y);              check(y == 32'h7c00, M_SPEC, "invsqrth(0)");

    // operand register: o1 moved two cycles before the trigger
    @(negedge clk);
    req[FU_MUL].o1data = 32'h40a00000; req[FU_MUL].o1load = 1;
    @(negedge clk);
    req[FU_MUL].o1load = 0; req[FU_MUL].o1data = 32'h12345678;
    @(negedge clk);
    req[FU_MUL].t1data = 32'h40000000; req[FU_MUL].t1load = 1;
    @(negedge clk) idle_all();
    repeat (LAT[FU_MUL] - 1) @(posedge clk);
    #1 check(r1[FU_MUL] == 32'h41200000, M_OPREG, "mul uses stored o1 (2*5)");
    // trigger again with no operand move: stored o1 reused
    op(FU_ADD, OP_ADD, ONE, 32'h40400000, 0, y);
    @(negedge clk); req[FU_ADD].t1data = 32'h40000000; req[FU_ADD].t1load = 1;
    @(negedge clk) idle_all();
    repeat (LAT[FU_ADD] - 1) @(posedge clk);
    #1 check(r1[FU_ADD] == 32'h40a00000, M_OPREG, "add reuses o1 (2+3)");
    // FMA second operand register
    @(negedge clk); req[FU_MAC].o2data = 32'h40800000; req[FU_MAC].o2load = 1;
    @(negedge clk); req[FU_MAC].o2load = 0;
    req[FU_MAC].t1data = ONE; req[FU_MAC].o1data = HALF; req[FU_MAC].o1load = 1;
    req[FU_MAC].t1opcode = 3'(MAC_MAC); req[FU_MAC].t1load = 1;
    @(negedge clk) idle_all();
    repeat (LAT[FU_MAC] - 1) @(posedge clk);
    #1 check(r1[FU_MAC] == 32'h40400000, M_OPREG, "fma uses stored o2 (1+0.5*4)");
    // forwarding: operand moved with the trigger overrides the stored one
    op(FU_MUL, 0, 32'h40000000, 32'h40400000, 0, y);
    check(y == 32'h40c00000, M_FWD, "same-cycle operand wins over stored");
    op(FU_HMUL, 0, 32'h4000, 32'h4400, 0, y);
    check(y == 32'h4800, M_FWD, "half same-cycle operand");

    // output hold while other units keep working
    h1 = r1[FU_MUL]; h2 = r1[FU_DIV];
    for (int k = 0; k < 10; k++) op(FU_ADD, OP_ADD, rnd(-5, 5, 23, 8), ONE, 0, y);
    check(r1[FU_MUL] == h1 && r1[FU_DIV] == h2, M_HOLD, "mul/div results held");
    op(FU_ACC, ACC_INITDIV, 32'h40c00000, 32'h40000000, 0, y);
    h1 = acc_r2; h2 = acc_r3;
    repeat (5) @(posedge clk);
    #1 check(acc_r2 == h1 && acc_r3 == h2 && h2 == 32'h40000000, M_HOLD, "accelerator r2/r3 held");

    // stall: start a division and a multiply, lock for 7 cycles mid-flight
    @(negedge clk);
    req[FU_DIV].t1data = 32'h41100000; req[FU_DIV].o1data = 32'h40400000;
    req[FU_DIV].t1load = 1; req[FU_DIV].o1load = 1;
    req[FU_MUL].t1data = 32'h40e00000; req[FU_MUL].o1data = 32'h40e00000;
    req[FU_MUL].t1load = 1; req[FU_MUL].o1load = 1;
    @(negedge clk) idle_all();
    @(negedge clk) glock = 1;
    repeat (7) @(posedge clk);
    @(negedge clk) glock = 0;
    // trigger edge + 1 free edge so far; mul needs 3 more, div 13 more
    repeat (2) @(posedge clk);
    #1 check(r1[FU_MUL] != 32'h42440000, M_STALL, "mul not early after stall");
    @(posedge clk);
    #1 check(r1[FU_MUL] == 32'h42440000, M_STALL, "mul 7*7 after stall");
    repeat (9) @(posedge clk);
    #1 check(r1[FU_DIV] != 32'h40400000, M_STALL, "div not early after stall");
    @(posedge clk);
    #1 check(r1[FU_DIV] == 32'h40400000, M_STALL, "div 9/3 after stall");
    // a trigger move during a stall does not start an operation until released
    @(negedge clk);
    glock = 1; req[FU_CMP].t1data = 32'h40000000; req[FU_CMP].t1opcode = 3'(CMP_NEG); req[FU_CMP].t1load = 1;
    @(posedge clk);
    #1 check(r1[FU_CMP] != 32'hc0000000, M_STALL, "stalled trigger ignored");
    @(negedge clk) glock = 0;
    @(posedge clk);
    #1 check(r1[FU_CMP] == 32'hc0000000, M_STALL, "trigger taken after release");
    idle_all();

    // parallel pipelined streams
    pipeline(1500);

    // software division and square root (Tables 6.1 and 6.2 style runs)
    divide_medium(32'h40c00000, 32'h40000000);
    divide_medium(ONE, 32'h40400000);
    divide_medium(ONE, 0);
    divide_medium(0, 0);
    divide_medium(32'h7f000000, 32'h7e800000);   // large / large, not flushed
    divide_slow(32'h40c00000, 32'h40000000);
    divide_slow(ONE, 32'h40400000);
    divide_slow(32'h7f800000, ONE);
    divide_slow(32'h7f000000, 32'h7e800000);
    for (int k = 0; k < 300; k++) begin
      divide_medium(rnd(-126, 127, 23, 8), rnd(-126, 127, 23, 8));
      divide_slow(rnd(-126, 127, 23, 8), rnd(-126, 127, 23, 8));
      divide_fast(rnd(-126, 127, 23, 8), rnd(-126, 127, 23, 8));
    end
    square_root(32'h40800000);
    square_root(32'h40000000);
    square_root(32'hbf800000);
    square_root(32'h7f800000);
    square_root(32'h00800000);
    square_root(32'h7f7fffff);
    for (int k = 0; k < 300; k++) square_root(rnd(-126, 127, 23, 8) & 32'h7fffffff);
    $display("max error: DivideFast %0d ulp, DivideMedium %0d ulp, DivideSlow %0d ulp, square root %0d ulp (vs truncated reference)",
             max_ulp[3], max_ulp[0], max_ulp[1], max_ulp[2]);

    foreach (mech[m]) begin
      $display("mechanism %-9s checks=%0d", mname[m], mech[m]);
      if (mech[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
