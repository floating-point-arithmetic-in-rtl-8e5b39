// tb_invsqrth: self-checking testbench of the half-precision inverse square
// root unit.
//
// Random positive normal half-precision inputs over the whole exponent range,
// one per cycle, each checked just after clock edge 5 (the trigger edge counts
// as edge 1), which checks the latency of 5. The result must be within 0.5 %
// of 1/sqrt(x) computed in double precision. The special cases +INF -> +0, +-0 -> +-INF and
// negative or NaN -> NaN are checked exactly. A glock stall and output hold
// are also checked. A watchdog ends a hung run.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_invsqrth;
  import fp_ref_pkg::*;
  localparam int MW = 10, EW = 5, L = 5;

  logic clk = 0, rstx = 0, glock = 0;
  logic [15:0] t1data = 0, r1data;
  logic t1load = 0;
  int checks = 0, failures = 0;

  invsqrth dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] x, logic [15:0] got);
    real ex, g;
    bit ok;
    if (is_nan(x, MW, EW) || (fsign(x, MW, EW) && !is_zero(x, MW, EW))) ok = is_nan(got, MW, EW);
    else if (is_zero(x, MW, EW)) ok = (got == {x[15], 15'h7c00});
    else if (is_inf(x, MW, EW))  ok = (got == 16'h0000);
    else begin
      ex = 1.0 / $sqrt(to_real(x, MW, EW));
      g  = to_real(got, MW, EW);
      ok = !fsign(got, MW, EW) && !is_nan(got, MW, EW) && !is_inf(got, MW, EW) &&
           (g > ex * 0.995 && g < ex * 1.005);
    end
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL invsqrt(%h): got %h", x, got);
    end
  endtask

  task automatic issue(logic [15:0] x);
    @(negedge clk);
    t1data = x; t1load = 1;
    @(posedge clk);
    fork
      begin
        repeat (L - 1) @(posedge clk);
        #1 check(x, r1data);
      end
    join_none
    #1 t1load = 0;
  endtask

  initial begin
    logic [15:0] hold;
    repeat (3) @(posedge clk);
    rstx = 1;
    issue(16'h3c00);   // 1 -> 1
    issue(16'h4400);   // 4 -> 0.5
    issue(16'h7c00);   // +INF -> +0
    issue(16'h0000);   // +0 -> +INF
    issue(16'h8000);   // -0 -> -INF
    issue(16'hbc00);   // -1 -> NaN
    issue(16'h7e00);   // NaN
    issue(16'h7bff);   // largest
    issue(16'h0400);   // smallest normal
    for (int k = 0; k < 3000; k++) issue(16'(rnd(-14, 15, MW, EW)) & 16'h7fff);
    repeat (L + 1) @(posedge clk);

    // glock stall: trigger while stalled, result must not appear early
    @(negedge clk);
    t1data = 16'h4400; t1load = 1;
    @(posedge clk);
    #1 t1load = 0; hold = r1data;
    @(negedge clk) glock = 1;
    repeat (6) @(posedge clk);
    #1 checks++;
    if (r1data != hold) begin failures++; $display("FAIL output changed under glock"); end
    @(negedge clk) glock = 0;
    repeat (L) @(posedge clk);
    #1 check(16'h4400, r1data);
    repeat (4) @(posedge clk);
    #1 check(16'h4400, r1data);   // output hold
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
