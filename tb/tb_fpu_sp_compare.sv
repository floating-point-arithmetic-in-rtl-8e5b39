// tb_fpu_sp_compare: self-checking testbench of the single-precision comparator.
//
// All operations on every pair of special values, then random operands
// with equal, sign-flipped and nearby values.
// Every result is checked just after clock edge 1 (the trigger edge counts
// as edge 1), which also
// checks the unit's latency. Results are compared with values computed
// independently in double precision.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpu_sp_compare;
  import fp_ref_pkg::*;
  import fpu_pkg::*;
  localparam int MW = 23, EW = 8, L = 1;

  logic clk = 0, rstx = 0, glock = 0;
  logic [32-1:0] t1data = 0, o1data = 0, o2data = 0;
  logic [32-1:0] r1data;
  logic t1load = 0, o1load = 0, o2load = 0;
  logic [3-1:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpu_sp_compare dut (.clk, .rstx, .glock, .t1data, .t1load, .t1opcode, .o1data, .o1load, .r1data);

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

  function automatic logic [31:0] ref_cmp(logic [31:0] a, logic [31:0] b, int op);
    bit un, eq, lt;
    real ra, rb;
    logic [31:0] sm;
    un = is_nan(a, MW, EW) || is_nan(b, MW, EW);
    ra = is_inf(a, MW, EW) ? (fsign(a, MW, EW) ? -1.0e300 : 1.0e300) : to_real(a, MW, EW);
    rb = is_inf(b, MW, EW) ? (fsign(b, MW, EW) ? -1.0e300 : 1.0e300) : to_real(b, MW, EW);
    eq = (ra == rb);
    lt = (ra < rb);
    sm = 32'd1 << (MW + EW);
    case (op)
      CMP_ABS: return a & (sm - 1);
      CMP_NEG: return a ^ sm;
      CMP_EQ: return 32'(!un && eq);
      CMP_NE: return 32'(un || !eq);
      CMP_LT: return 32'(!un && lt);
      CMP_LE: return 32'(!un && (lt || eq));
      CMP_GT: return 32'(!un && !lt && !eq);
      CMP_GE: return 32'(!un && !lt);
      default: return 0;
    endcase
  endfunction

  initial begin
    logic [31:0] a, b, sp [6];
    repeat (3) @(posedge clk);
    rstx = 1;
    sp[0] = 32'h00000000; sp[1] = 32'h80000000; sp[2] = 32'h7f800000; sp[3] = 32'hff800000; sp[4] = 32'h7fc00000; sp[5] = 32'h3f800000;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int op = 0; op < 8; op++) issue(sp[i], sp[j], 0, op, ref_cmp(sp[i], sp[j], op));
    for (int k = 0; k < 3000; k++) begin
      int op;
      a  = rnd(-5, 5, MW, EW);
      b  = ($urandom % 4 == 0) ? a ^ (32'($urandom % 2) << (MW + EW)) : rnd(-5, 5, MW, EW);
      if ($urandom % 8 == 0) b = a;
      op = int'($urandom % 8);
      issue(a, b, 0, op, ref_cmp(a, b, op));
    end
    // Operand from the port register: o1 written two cycles before the trigger.
    @(negedge clk); o1data = 32'(32'h3f800000); o1load = 1;
    @(negedge clk); o1load = 0; o1data = '0;
    @(negedge clk); t1data = 32'(32'h00000000); t1opcode = CMP_LT; t1load = 1;
    @(negedge clk); t1load = 0;
    check(32'(r1data), 32'd1, "0 < 1 with o1 from port register");
    repeat (L + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
