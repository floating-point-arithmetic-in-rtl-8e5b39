// tb_fpu_sp_sqrt: self-checking testbench of the single-precision square-root unit.
//
// Random positive operands over the whole exponent range, odd and even
// exponents, and the special cases, one per cycle.
// Every result is checked just after clock edge 26 (the trigger edge counts
// as edge 1), which also
// checks the unit's latency. Results are compared with values computed
// independently in double precision.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpu_sp_sqrt;
  import fp_ref_pkg::*;
  import fpu_pkg::*;
  localparam int MW = 23, EW = 8, L = 26;

  logic clk = 0, rstx = 0, glock = 0;
  logic [32-1:0] t1data = 0, o1data = 0, o2data = 0;
  logic [32-1:0] r1data;
  logic t1load = 0, o1load = 0, o2load = 0;
  logic [3-1:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpu_sp_sqrt dut (.clk, .rstx, .glock, .t1data, .t1load, .r1data);

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
    t1data = 32'(a); o1data = 32'(b); o2data = 32'(c); t1opcode = 3'(op);
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

  function automatic logic [31:0] ref_sqrt(logic [31:0] a);
    if (is_nan(a, MW, EW)) return 32'h7fc00000;
    if (is_zero(a, MW, EW)) return {fsign(a, MW, EW), 31'd0};
    if (fsign(a, MW, EW)) return 32'h7fc00000;
    if (is_inf(a, MW, EW)) return a;
    return from_real($sqrt(to_real(a, MW, EW)), MW, EW);
  endfunction

  initial begin
    logic [31:0] a;
    repeat (3) @(posedge clk);
    rstx = 1;
    issue(32'h40800000, 0, 0, 0, 32'h40000000);   // sqrt 4 = 2
    issue(32'h40000000, 0, 0, 0, 32'h3fb504f3);   // sqrt 2 truncated
    issue(32'h80000000, 0, 0, 0, 32'h80000000);   // sqrt -0 = -0
    issue(32'hbf800000, 0, 0, 0, 32'h7fc00000);   // sqrt -1 = NaN
    issue(32'h7f800000, 0, 0, 0, 32'h7f800000);   // sqrt INF
    issue(32'h00000001, 0, 0, 0, 32'h00000000);   // subnormal reads as 0
    for (int k = 0; k < 3000; k++) begin
      a = rnd(-126, 127, MW, EW) & 32'h7fffffff;
      issue(a, 0, 0, 0, ref_sqrt(a));
    end
    repeat (L + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
