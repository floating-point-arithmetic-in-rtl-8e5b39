// tb_fpu_chf_cfh: self-checking testbench of the single <-> half precision
// converter.
//
// CFH (single to half) on random singles over an exponent range wider than
// half precision, so overflow to INF and underflow to zero are exercised, and
// CHF (half to single) on random half-precision patterns, including every
// special class. The reference re-encodes the real value with truncation; half
// to single is exact. NaN must stay NaN. Each result is checked just after the
// trigger edge (latency 1), back to back, one per cycle. Output hold and a glock
// stall are also checked. A watchdog ends a hung run.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpu_chf_cfh;
  import fp_ref_pkg::*;
  import fpu_pkg::*;

  logic clk = 0, rstx = 0, glock = 0;
  logic [31:0] t1data = 0, r1data;
  logic t1load = 0;
  logic [0:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpu_chf_cfh dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, bit half, string what);
    bit ok;
    ok = half ? (is_nan(exp, 10, 5) ? (is_nan(got, 10, 5) && got[31:16] == 0) : got === exp)
              : (is_nan(exp, 23, 8) ? is_nan(got, 23, 8) : got === exp);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] ref_cfh(logic [31:0] x);
    if (is_nan(x, 23, 8)) return 32'h7e00;
    if (is_inf(x, 23, 8)) return inf(fsign(x, 23, 8), 10, 5);
    return from_real(to_real(x, 23, 8), 10, 5, fsign(x, 23, 8));
  endfunction

  function automatic logic [31:0] ref_chf(logic [15:0] h);
    if (is_nan(h, 10, 5)) return 32'h7fc00000;
    if (is_inf(h, 10, 5)) return inf(fsign(h, 10, 5), 23, 8);
    return from_real(to_real(h, 10, 5), 23, 8, fsign(h, 10, 5));
  endfunction

  task automatic issue(logic [31:0] x, bit op);
    logic [31:0] exp;
    exp = op == FH_CFH ? ref_cfh(x) : ref_chf(x[15:0]);
    @(negedge clk);
    t1data = x; t1opcode = op; t1load = 1;
    @(posedge clk);
    #1 t1load = 0;
    check(r1data, exp, op == FH_CFH, $sformatf("%s %h", op == FH_CFH ? "CFH" : "CHF", x));
  endtask

  initial begin
    logic [31:0] hold;
    repeat (3) @(posedge clk);
    rstx = 1;
    issue(32'h3f800000, FH_CFH);   // 1.0
    issue(32'h477fe000, FH_CFH);   // 65504, largest half
    issue(32'h47800000, FH_CFH);   // 65536 -> INF
    issue(32'hc7800000, FH_CFH);   // -> -INF
    issue(32'h38800000, FH_CFH);   // 2^-14, smallest normal half
    issue(32'h38000000, FH_CFH);   // 2^-15 -> 0
    issue(32'h7f800001, FH_CFH);   // NaN with payload lost by truncation
    issue(32'h00000001, FH_CFH);   // subnormal -> 0
    issue(32'h00003c00, FH_CHF);
    issue(32'h00007c00, FH_CHF);
    issue(32'h0000fc00, FH_CHF);
    issue(32'h00007c01, FH_CHF);
    issue(32'h00000001, FH_CHF);   // half subnormal -> 0
    issue(32'h00008000, FH_CHF);
    for (int k = 0; k < 3000; k++) begin
      if ($urandom % 2 == 0) issue(rnd(-20, 20, 23, 8), FH_CFH);
      else                   issue($urandom % 65536, FH_CHF);
    end

    hold = r1data;
    repeat (3) @(posedge clk);
    #1 check(r1data, hold, 0, "output hold");
    @(negedge clk);
    glock = 1; t1data = 32'h40000000; t1opcode = FH_CFH; t1load = 1;
    repeat (2) @(posedge clk);
    #1 check(r1data, hold, 0, "stall holds output");
    @(negedge clk) glock = 0;
    @(posedge clk);
    #1 t1load = 0;
    check(r1data, 32'h4000, 1, "stalled CFH completes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
