// tb_fpmac_v2: self-checking testbench of the half-precision fused multiply-adder.
//
// All five operations on random half-precision operands and special cases.
// Two more copies, with two and three stages bypassed (latency 4 and 3), get the
// same stream and are checked at their own latencies.
// Every result is checked just after clock edge 6 (the trigger edge counts
// as edge 1), which also
// checks the unit's latency. Results are compared with values computed
// independently in double precision.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fpmac_v2;
  import fp_ref_pkg::*;
  import fpu_pkg::*;
  localparam int MW = 10, EW = 5, L = 6;

  logic clk = 0, rstx = 0, glock = 0;
  logic [16-1:0] t1data = 0, o1data = 0, o2data = 0;
  logic [16-1:0] r1data;
  logic t1load = 0, o1load = 0, o2load = 0;
  logic [3-1:0] t1opcode = 0;
  int checks = 0, failures = 0;

  fpmac_v2 dut (.*);

  // Copies with stages bypassed: latency 4 (bypass_4, bypass_5) and latency 3
  // (bypass_3 to bypass_5), the half-precision configurations reported for FPGA
  // targets. Same inputs, checked at their own latencies.
  logic [15:0] r1data_4, r1data_3;
  fpmac_v2 #(.bypass_4(1), .bypass_5(1)) dut_4 (
    .clk, .rstx, .glock, .t1data, .t1load, .t1opcode, .o1data, .o1load,
    .o2data, .o2load, .r1data(r1data_4));
  fpmac_v2 #(.bypass_3(1), .bypass_4(1), .bypass_5(1)) dut_3 (
    .clk, .rstx, .glock, .t1data, .t1load, .t1opcode, .o1data, .o1load,
    .o2data, .o2load, .r1data(r1data_3));

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
      begin
        repeat (3) @(posedge clk);
        #1 check(32'(r1data_4), exp, $sformatf("latency-4 op%0d %h %h %h", op, a, b, c));
      end
      begin
        repeat (2) @(posedge clk);
        #1 check(32'(r1data_3), exp, $sformatf("latency-3 op%0d %h %h %h", op, a, b, c));
      end
    join_none
    #1 t1load = 0; o1load = 0; o2load = 0;
  endtask

  bit saw_nan = 0;
  function automatic logic [31:0] ref_mac(logic [31:0] a, logic [31:0] b, logic [31:0] c, int op);
    logic [31:0] A, B, C, sm, one;
    bit sp, nan, bi, ci, ai;
    sm  = 32'd1 << (MW + EW);
    one = 32'(bias(EW)) << MW;
    case (op)
      MAC_ADD: begin A = a; B = b; C = one; end
      MAC_SUB: begin A = a; B = b ^ sm; C = one; end
      MAC_MUL: begin A = sm; B = a; C = b; end
      MAC_MSU: begin A = a; B = b ^ sm; C = c; end
      default: begin A = a; B = b; C = c; end
    endcase
    sp = fsign(B, MW, EW) ^ fsign(C, MW, EW);
    ai = is_inf(A, MW, EW); bi = is_inf(B, MW, EW); ci = is_inf(C, MW, EW);
    nan = is_nan(A, MW, EW) || is_nan(B, MW, EW) || is_nan(C, MW, EW) ||
          (bi && is_zero(C, MW, EW)) || (ci && is_zero(B, MW, EW)) ||
          (ai && (bi || ci) && fsign(A, MW, EW) != sp);
    if (nan) return 32'h7e00;
    if (ai) return A;
    if (bi || ci) return inf(sp, MW, EW);
    return from_real(to_real(A, MW, EW) + to_real(B, MW, EW) * to_real(C, MW, EW), MW, EW,
                     is_zero(A, MW, EW) && (is_zero(B, MW, EW) || is_zero(C, MW, EW)) && fsign(A, MW, EW) && sp);
  endfunction

  initial begin
    logic [31:0] a, b, c;
    repeat (3) @(posedge clk);
    rstx = 1;
    issue(32'h3c00, 32'h3c00, 32'h3c00, MAC_MAC, 32'h4000);                  // 1 + 1*1
    issue(32'h3c00, 32'h3c00, 32'h3c00, MAC_MSU, 0);                    // 1 - 1*1 = +0
    issue(32'h3c00, 32'h3c00, 0, MAC_SUB, 0);
    issue(32'h4000, 32'h4000, 0, MAC_MUL, 32'h4400);
    issue(32'h8000, 32'h3c00, 0, MAC_MUL, 32'h8000);                      // -0 * 1 = -0
    issue(32'h7c00, 32'h7c00, 32'h3c00, MAC_MSU, 32'h7e00);               // INF - INF
    issue(32'h3c00, 32'h7c00, 0, MAC_MAC, 32'h7e00);                  // INF * 0
    issue(32'h7bff, 32'h7bff, 0, MAC_ADD, 32'h7c00);                   // overflow
    for (int k = 0; k < 4000; k++) begin
      int op, e, ep;
      op = int'($urandom % 5);
      e  = int'($urandom % (2 * 12)) - 12;
      b  = rnd(e / 2 - 3, e / 2 + 3, MW, EW);
      c  = rnd(e / 2 - 3, e / 2 + 3, MW, EW);
      ep = fexp(b, MW, EW) + fexp(c, MW, EW) - 2 * bias(EW);
      if (op == MAC_MUL)                          a = b;
      else if (op == MAC_ADD || op == MAC_SUB)    a = rnd(fexp(b, MW, EW) - bias(EW) - 8, fexp(b, MW, EW) - bias(EW) + 8, MW, EW);
      else                                        a = rnd(ep - 8, ep + 4, MW, EW);
      if (op == MAC_MUL || op == MAC_ADD || op == MAC_SUB) begin
        issue(a, c, 0, op, ref_mac(a, c, 0, op));
      end else begin
        issue(a, b, c, op, ref_mac(a, b, c, op));
      end
    end
    repeat (L + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
