// tb_fpu_sp_add_sub: self-checking testbench of the single-precision adder.
//
// It issues one operation per cycle (random operands with nearby exponents,
// whose sums a double computes exactly, plus hand-picked special and boundary
// cases). Each result is checked exactly 5 cycles after its trigger, which
// also checks the latency. A global-lock stall and the hold of the output
// register are checked at the end.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpu_sp_add_sub;
  import fp_ref_pkg::*;
  localparam int MW = 23, EW = 8, L = 5;

  logic clk = 0, rstx = 0, glock = 0;
  logic [31:0] t1data = 0, o1data = 0, r1data;
  logic t1load = 0, o1load = 0;
  logic [0:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpu_sp_add_sub dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // Drive one operation in the next cycle and check its result L cycles on.
  task automatic issue(logic [31:0] a, logic [31:0] b, bit sub, logic [31:0] exp);
    @(negedge clk);
    t1data = a; o1data = b; t1opcode = sub; t1load = 1; o1load = 1;
    @(posedge clk);
    fork
      begin
        repeat (L - 1) @(posedge clk);
        #1 check(r1data, exp, $sformatf("%h %s %h", a, sub ? "-" : "+", b));
      end
    join_none
    #1 t1load = 0; o1load = 0;
  endtask

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b, bit sub);
    real ra, rb;
    bit  sb;
    sb = fsign(b, MW, EW) ^ sub;
    if (is_nan(a, MW, EW) || is_nan(b, MW, EW)) return 32'h7fc00000;
    if (is_inf(a, MW, EW) && is_inf(b, MW, EW) && fsign(a, MW, EW) != sb) return 32'h7fc00000;
    if (is_inf(a, MW, EW)) return a;
    if (is_inf(b, MW, EW)) return inf(sb, MW, EW);
    ra = to_real(a, MW, EW);
    rb = to_real(b, MW, EW);
    if (sub) rb = -rb;
    return from_real(ra + rb, MW, EW, is_zero(a, MW, EW) && is_zero(b, MW, EW) && fsign(a, MW, EW) && sb);
  endfunction

  initial begin
    logic [31:0] a, b, held;
    int k;
    repeat (3) @(posedge clk);
    rstx = 1;
    // Special and boundary cases.
    issue(32'h3f800000, 32'h3f800000, 0, 32'h40000000);        // 1 + 1
    issue(32'h3f800000, 32'h3f800000, 1, 32'h00000000);        // 1 - 1 = +0
    issue(32'h3f800000, 32'h2b800000, 1, 32'h3f7fffff);        // 1 - 2^-40 truncates down
    issue(32'h3f800000, 32'h2b800000, 0, 32'h3f800000);        // 1 + 2^-40
    issue(32'hbf800000, 32'h2b800000, 0, 32'hbf7fffff);        // -1 + 2^-40
    issue(32'h7f7fffff, 32'h7f7fffff, 0, 32'h7f800000);        // overflow to INF
    issue(32'h7f800000, 32'h7f800000, 1, 32'h7fc00000);        // INF - INF = NaN
    issue(32'h7f800000, 32'h3f800000, 0, 32'h7f800000);        // INF + 1
    issue(32'hff800000, 32'h3f800000, 1, 32'hff800000);        // -INF - 1
    issue(32'h7fc00001, 32'h3f800000, 0, 32'h7fc00000);        // NaN in
    issue(32'h00400000, 32'h00000000, 0, 32'h00000000);        // subnormal reads as 0
    issue(32'h80000000, 32'h80000000, 0, 32'h80000000);        // -0 + -0
    issue(32'h80000000, 32'h00000000, 0, 32'h00000000);        // -0 + +0
    issue(32'h00800000, 32'h00c00000, 1, 32'h80000000);        // result below normal range
    issue(32'h00000000, 32'hc0400000, 0, 32'hc0400000);        // 0 + -3
    // Random operands with exponents at most 20 apart.
    for (k = 0; k < 3000; k++) begin
      int e;
      bit s;
      e = int'($urandom % 200) - 100;
      s = 1'($urandom);
      a = rnd(e, e, MW, EW);
      b = rnd(e - 20, e + 20, MW, EW);
      issue(a, b, s, ref_add(a, b, s));
    end
    // Operand o1 written one cycle ahead; the port register must hold it.
    @(negedge clk); o1data = 32'h40400000; o1load = 1;          // 3.0
    @(negedge clk); o1load = 0; o1data = 32'hdeadbeef;
    t1data = 32'h3f800000; t1opcode = 0; t1load = 1;            // 1 + 3
    @(negedge clk); t1load = 0;
    repeat (L) @(negedge clk);
    check(r1data, 32'h40800000, "o1 from port register");
    // Stall: glock high for 4 cycles delays the result by 4 cycles.
    @(negedge clk); t1data = 32'h40000000; o1data = 32'h40000000; o1load = 1; t1load = 1;  // 2 + 2
    @(negedge clk); t1load = 0; o1load = 0; glock = 1;
    repeat (4) @(negedge clk);
    glock = 0;
    repeat (L - 2) @(negedge clk);
    check(r1data == 32'h40800000 ? 32'h0 : 32'h1, 32'h0, "result not early during stall");
    @(negedge clk);
    check(r1data, 32'h40800000, "stalled result");
    held = r1data;
    repeat (10) @(negedge clk);
    check(r1data, held, "output register holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
