// tb_fpadd_fpsub: self-checking testbench of the half-precision adder-subtractor.
//
// Random half-precision operands with exponents at most 12 apart (exact in
// double precision) and special cases, one per cycle.
// Every result is checked just after clock edge 2 (the trigger edge counts
// as edge 1), which also
// checks the unit's latency. Results are compared with values computed
// independently in double precision.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpadd_fpsub;
  import fp_ref_pkg::*;
  import fpu_pkg::*;
  localparam int MW = 10, EW = 5, L = 2;

  logic clk = 0, rstx = 0, glock = 0;
  logic [16-1:0] t1data = 0, o1data = 0, o2data = 0;
  logic [16-1:0] r1data;
  logic t1load = 0, o1load = 0, o2load = 0;
  logic [1-1:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpadd_fpsub dut (.clk, .rstx, .glock, .t1data, .t1load, .t1opcode, .o1data, .o1load, .r1data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (is_nan(exp, MW, EW) ? !is_nan(got, MW, EW) : (got !== exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic issue(logic [31:0] a, logic [31:0] b, logic [31:0] c, int op, logic [31:0] exp);
    @(negedge clk);
    t1data = 16'(a); o1data = 16'(b); o2data = 16'(c); t1opcode = 1'(op);
    t1load = 1; o1load = 1; o2load = 1;
    @(posedge clk);
    fork
      begin
        if (L > 1) repeat (L - 1) @(posedge clk);
        #1 check(32'(r1data), exp, $sformatf("op%0d %h %h %h", op, a, b, c));
      end
    join_none
    #1 t1load = 0; o1load = 0; o2load = 0;
  endtask

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b, bit sub);
    bit sb;
    sb = fsign(b, MW, EW) ^ sub;
    if (is_nan(a, MW, EW) || is_nan(b, MW, EW)) return 32'h7e00;
    if (is_inf(a, MW, EW) && is_inf(b, MW, EW) && fsign(a, MW, EW) != sb) return 32'h7e00;
    if (is_inf(a, MW, EW)) return a;
    if (is_inf(b, MW, EW)) return inf(sb, MW, EW);
    return from_real(to_real(a, MW, EW) + (sub ? -1.0 : 1.0) * to_real(b, MW, EW), MW, EW,
                     is_zero(a, MW, EW) && is_zero(b, MW, EW) && fsign(a, MW, EW) && sb);
  endfunction

  initial begin
    logic [31:0] a, b;
    bit s;
    repeat (3) @(posedge clk);
    rstx = 1;
    issue(32'h3c00, 32'h3c00, 0, 0, 32'h4000);   // 1 + 1
    issue(32'h3c00, 32'h3c00, 0, 1, 32'h0000);   // 1 - 1
    issue(32'h3c00, 32'h0400, 0, 1, 32'h3bff);   // 1 - 2^-14 truncates
    issue(32'h7bff, 32'h7bff, 0, 0, 32'h7c00);   // overflow
    issue(32'h7c00, 32'h7c00, 0, 1, 32'h7e00);   // INF - INF
    for (int k = 0; k < 3000; k++) begin
      int e;
      e = int'($urandom % 24) - 10;
      s = 1'($urandom);
      a = rnd(e, e, MW, EW);
      b = rnd((e - 12 < -14) ? -14 : e - 12, (e + 12 > 15) ? 15 : e + 12, MW, EW);
      issue(a, b, 0, s, ref_add(a, b, s));
    end
    repeat (L + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
