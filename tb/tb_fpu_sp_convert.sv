// tb_fpu_sp_convert: self-checking testbench of the float/integer converter.
//
// All four conversions on random values of every magnitude and on the
// saturating and special cases, one per cycle.
// Every result is checked just after clock edge 4 (the trigger edge counts
// as edge 1), which also
// checks the unit's latency. Results are compared with values computed
// independently in double precision.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpu_sp_convert;
  import fp_ref_pkg::*;
  import fpu_pkg::*;
  localparam int MW = 23, EW = 8, L = 4;

  logic clk = 0, rstx = 0, glock = 0;
  logic [32-1:0] t1data = 0, o1data = 0, o2data = 0;
  logic [32-1:0] r1data;
  logic t1load = 0, o1load = 0, o2load = 0;
  logic [3-1:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpu_sp_convert dut (.clk, .rstx, .glock, .t1data, .t1load, .t1opcode(t1opcode[1:0]), .r1data);

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

  function automatic logic [31:0] ref_cvt(logic [31:0] x, int op);
    real r;
    case (op)
      0: begin
        if (is_nan(x, MW, EW)) return 0;
        if (is_inf(x, MW, EW)) return fsign(x, MW, EW) ? 32'h80000000 : 32'h7fffffff;
        r = to_real(x, MW, EW);
        if (r >= 2147483648.0) return 32'h7fffffff;
        if (r <= -2147483648.0) return 32'h80000000;
        return 32'($rtoi(r));
      end
      1: begin
        if (is_nan(x, MW, EW) || fsign(x, MW, EW)) return 0;
        if (is_inf(x, MW, EW)) return 32'hffffffff;
        r = to_real(x, MW, EW);
        if (r >= 4294967296.0) return 32'hffffffff;
        return 32'(longint'($rtoi(r / 2.0)) * 2 + ((r - 2.0 * real'($rtoi(r / 2.0))) >= 1.0 ? 1 : 0));
      end
      2: return from_real(real'($signed(x)), MW, EW);
      default: return from_real(real'({32'd0, x}), MW, EW);
    endcase
  endfunction

  initial begin
    logic [31:0] x;
    repeat (3) @(posedge clk);
    rstx = 1;
    issue(32'h3fc00000, 0, 0, CVT_CFI, 32'd1);            // 1.5 -> 1
    issue(32'hbfc00000, 0, 0, CVT_CFI, 32'hffffffff);     // -1.5 -> -1
    issue(32'h4f000000, 0, 0, CVT_CFI, 32'h7fffffff);     // 2^31 saturates
    issue(32'hcf000000, 0, 0, CVT_CFI, 32'h80000000);     // -2^31
    issue(32'h4f800000, 0, 0, CVT_CFIU, 32'hffffffff);    // 2^32 saturates
    issue(32'h4f7fffff, 0, 0, CVT_CFIU, 32'hffffff00);
    issue(32'hbf800000, 0, 0, CVT_CFIU, 32'd0);           // negative -> 0
    issue(32'h80000000, 0, 0, CVT_CIF, 32'hcf000000);     // INT_MIN
    issue(32'h7fffffff, 0, 0, CVT_CIF, 32'h4effffff);     // truncated
    issue(32'hffffffff, 0, 0, CVT_CIFU, 32'h4f7fffff);
    issue(32'h00000000, 0, 0, CVT_CIF, 32'h00000000);
    issue(32'h7fc00000, 0, 0, CVT_CFI, 32'd0);
    for (int k = 0; k < 3000; k++) begin
      int op;
      op = int'($urandom % 4);
      if (op < 2) x = rnd(-3, 33, MW, EW);
      else        x = $urandom >> ($urandom % 32);
      if (op == 2 && $urandom % 2 == 1) x = -x;
      issue(x, 0, 0, op, ref_cvt(x, op));
    end
    repeat (L + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
