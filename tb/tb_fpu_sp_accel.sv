// tb_fpu_sp_accel: self-checking testbench of the division / square-root
// helper unit.
//
// Each operation is issued with random operands and the outputs are checked one
// clock edge later (latency 1, the trigger edge itself):
//   INITDIV   a' and b' carry the significands of a and b with exponent 0 and
//             c = sign * 2^(ea-eb), so c * a'/b' equals a/b exactly; special
//             cases give a' = b' = 1 and c = the IEEE result.
//   INITSQRT  c * sqrt(b') equals sqrt(b) exactly, b' in [1,4), c a power of two.
//   MULP2     exact scaling by a power of two (overflow to INF, underflow to 0).
//   RECIPA    |y * b' - 1| < 2^-7 (8-bit table: half an interval plus entry
//             quantization).
//   RSQRTA    |y * sqrt(b') - 1| < 2^-6 (7-bit table).
// It also checks that the outputs hold while no operation is triggered and
// while glock is high. A watchdog ends a hung run.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpu_sp_accel;
  import fp_ref_pkg::*;
  import fpu_pkg::*;
  localparam int MW = 23, EW = 8;
  localparam logic [31:0] ONE = 32'h3f800000, QNAN = 32'h7fc00000;

  logic clk = 0, rstx = 0, glock = 0;
  logic [31:0] t1data = 0, o1data = 0, r1data, r2data, r3data;
  logic t1load = 0, o1load = 0;
  logic [2:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpu_sp_accel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic bit same(logic [31:0] got, logic [31:0] exp);
    return is_nan(exp, MW, EW) ? is_nan(got, MW, EW) : (got === exp);
  endfunction

  // Drive one operation, return after the trigger edge with outputs settled.
  task automatic run(int op, logic [31:0] a, logic [31:0] b);
    @(negedge clk);
    t1data = a; o1data = b; t1opcode = 3'(op); t1load = 1; o1load = 1;
    @(posedge clk);
    #1 t1load = 0; o1load = 0;
  endtask

  function automatic real mant(logic [31:0] x);   // significand in [1,2)
    return 1.0 + real'(fman(x, MW)) / real'(1 << MW);
  endfunction

  task automatic t_initdiv(logic [31:0] a, logic [31:0] b);
    real q, ex;
    run(ACC_INITDIV, a, b);
    if (is_nan(a, MW, EW) || is_nan(b, MW, EW) || (is_zero(a, MW, EW) && is_zero(b, MW, EW)) ||
        (is_inf(a, MW, EW) && is_inf(b, MW, EW))) begin
      check(r1data == ONE && r2data == ONE && is_nan(r3data, MW, EW), $sformatf("INITDIV nan %h %h", a, b));
    end else if (is_inf(a, MW, EW) || is_zero(b, MW, EW)) begin
      check(r1data == ONE && r2data == ONE && r3data == inf(fsign(a, MW, EW) ^ fsign(b, MW, EW), MW, EW),
            $sformatf("INITDIV inf %h %h", a, b));
    end else if (is_zero(a, MW, EW) || is_inf(b, MW, EW)) begin
      check(r1data == ONE && r2data == ONE && r3data == {fsign(a, MW, EW) ^ fsign(b, MW, EW), 31'd0},
            $sformatf("INITDIV zero %h %h", a, b));
    end else begin
      check(r1data == {9'h07f, a[22:0]} && r2data == {9'h07f, b[22:0]}, $sformatf("INITDIV a'b' %h %h", a, b));
      ex = to_real(a, MW, EW) / to_real(b, MW, EW);
      q  = to_real(r3data, MW, EW) * mant(a) / mant(b);
      // c exact while 2^(ea-eb) is a normal number
      if (fexp(a, MW, EW) - fexp(b, MW, EW) > -126 && fexp(a, MW, EW) - fexp(b, MW, EW) < 128)
        check(q == ex && fman(r3data, MW) == 0, $sformatf("INITDIV c %h %h -> %h", a, b, r3data));
    end
  endtask

  task automatic t_initsqrt(logic [31:0] b);
    real v;
    run(ACC_INITSQRT, b, 0);
    if (is_nan(b, MW, EW) || (fsign(b, MW, EW) && !is_zero(b, MW, EW)))
      check(r1data == ONE && is_nan(r3data, MW, EW), $sformatf("INITSQRT nan %h", b));
    else if (is_zero(b, MW, EW))
      check(r1data == ONE && r3data == {b[31], 31'd0}, $sformatf("INITSQRT zero %h", b));
    else if (is_inf(b, MW, EW))
      check(r1data == ONE && r3data == 32'h7f800000, $sformatf("INITSQRT inf %h", b));
    else begin
      v = to_real(r1data, MW, EW);
      check(v >= 1.0 && v < 4.0 && fman(r1data, MW) == fman(b, MW) && fman(r3data, MW) == 0 &&
            to_real(r3data, MW, EW) ** 2 * v == to_real(b, MW, EW),
            $sformatf("INITSQRT %h -> %h %h", b, r1data, r3data));
    end
  endtask

  initial begin
    logic [31:0] a, b, hold1, hold3;
    real y, bp;
    repeat (3) @(posedge clk);
    rstx = 1;

    // INITDIV specials and random
    t_initdiv(32'h40400000, 32'h40000000);
    t_initdiv(32'h00000000, 32'h00000000);
    t_initdiv(32'h7f800000, 32'hff800000);
    t_initdiv(32'hff800000, 32'h3f800000);
    t_initdiv(32'h3f800000, 32'h80000000);
    t_initdiv(32'h80000000, 32'h3f800000);
    t_initdiv(32'h3f800000, 32'h7f800000);
    t_initdiv(32'h7fc00000, 32'h3f800000);
    for (int k = 0; k < 1000; k++) t_initdiv(rnd(-126, 127, MW, EW), rnd(-126, 127, MW, EW));

    // INITSQRT
    t_initsqrt(32'h40800000);
    t_initsqrt(32'h80000000);
    t_initsqrt(32'hbf800000);
    t_initsqrt(32'h7f800000);
    t_initsqrt(32'h7fc00000);
    for (int k = 0; k < 1000; k++) t_initsqrt(rnd(-126, 127, MW, EW) & 32'h7fffffff);

    // MULP2
    for (int k = 0; k < 1000; k++) begin
      a = rnd(-126, 127, MW, EW);
      b = make($urandom % 2, int'($urandom % 254) + 1, 0, MW, EW);
      run(ACC_MULP2, a, b);
      check(same(r1data, from_real(to_real(a, MW, EW) * to_real(b, MW, EW), MW, EW)),
            $sformatf("MULP2 %h %h -> %h", a, b, r1data));
    end
    run(ACC_MULP2, 32'h7f800000, 32'h00000000);
    check(is_nan(r1data, MW, EW), "MULP2 INF*0");
    run(ACC_MULP2, 32'h3f800000, 32'hff800000);
    check(r1data == 32'hff800000, "MULP2 1*-INF");

    // RECIPA, RSQRTA
    for (int k = 0; k < 1000; k++) begin
      b = rnd(-126, 127, MW, EW) & 32'h7fffffff;
      run(ACC_RECIPA, b, 0);
      y = to_real(r1data, MW, EW) * mant(b);
      check(y > 1.0 - 1.0 / 128 && y < 1.0 + 1.0 / 128 && fexp(r1data, MW, EW) == 126,
            $sformatf("RECIPA %h -> %h (%f)", b, r1data, y));
      run(ACC_RSQRTA, b, 0);
      bp = mant(b) * (((fexp(b, MW, EW) - 127) % 2 != 0) ? 2.0 : 1.0);
      y = to_real(r1data, MW, EW) * $sqrt(bp);
      check(y > 1.0 - 1.0 / 64 && y < 1.0 + 1.0 / 64,
            $sformatf("RSQRTA %h -> %h (%f)", b, r1data, y));
    end

    // output hold: no trigger, and stalled trigger
    run(ACC_INITDIV, 32'h40400000, 32'h40000000);
    hold1 = r1data; hold3 = r3data;
    repeat (3) @(posedge clk);
    #1 check(r1data == hold1 && r3data == hold3, "output hold without trigger");
    @(negedge clk);
    glock = 1; t1data = 32'h41000000; t1opcode = 3'(ACC_INITSQRT); t1load = 1;
    repeat (2) @(posedge clk);
    #1 check(r1data == hold1 && r3data == hold3, "output hold under glock");
    @(negedge clk) glock = 0;
    @(posedge clk);
    #1 check(r3data == 32'h40000000 && r1data == 32'h40000000, "stalled INITSQRT completes");
    t1load = 0;

    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
