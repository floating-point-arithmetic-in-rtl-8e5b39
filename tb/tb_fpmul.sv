// tb_fpmul: self-checking testbench of the half-precision multiplier.
//
// Random half-precision operands over the whole exponent range and special
// cases, one per cycle.
// Every result is checked just after clock edge 2 (the trigger edge counts
// as edge 1), which also
// checks the unit's latency. Results are compared with values computed
// independently in double precision.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpmul;
  import fp_ref_pkg::*;
  import fpu_pkg::*;
  localparam int MW = 10, EW = 5, L = 2;

  logic clk = 0, rstx = 0, glock = 0;
  logic [16-1:0] t1data = 0, o1data = 0, o2data = 0;
  logic [16-1:0] r1data;
  logic t1load = 0, o1load = 0, o2load = 0;
  logic [3-1:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpmul dut (.clk, .rstx, .glock, .t1data, .t1load, .o1data, .o1load, .r1data);

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
    t1data = 16'(a); o1data = 16'(b); o2data = 16'(c); t1opcode = 3'(op);
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

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    bit s;
    s = fsign(a, MW, EW) ^ fsign(b, MW, EW);
    if (is_nan(a, MW, EW) || is_nan(b, MW, EW)) return 32'h7e00;
    if ((is_inf(a, MW, EW) && is_zero(b, MW, EW)) || (is_inf(b, MW, EW) && is_zero(a, MW, EW))) return 32'h7e00;
    if (is_inf(a, MW, EW) || is_inf(b, MW, EW)) return inf(s, MW, EW);
    return from_real(to_real(a, MW, EW) * to_real(b, MW, EW), MW, EW, s);
  endfunction

  initial begin
    logic [31:0] a, b;
    repeat (3) @(posedge clk);
    rstx = 1;
    issue(32'h3e00, 32'h4000, 0, 0, 32'h4200);   // 1.5 * 2 = 3
    issue(32'h7800, 32'h4000, 0, 0, 32'h7c00);   // 32768 * 2 overflows
    issue(32'h7c00, 32'h0000, 0, 0, 32'h7e00);   // INF * 0
    issue(32'h0400, 32'h3800, 0, 0, 32'h0000);   // underflow
    for (int k = 0; k < 3000; k++) begin
      a = rnd(-14, 15, MW, EW);
      b = rnd(-14, 15, MW, EW);
      issue(a, b, 0, 0, ref_mul(a, b));
    end
    repeat (L + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
