// tb_fu_interface: self-checking testbench of the operand port register
// (fu_operand_reg) used on every operand port of the function units.
//
// Random load, data and glock patterns are driven for several thousand cycles
// and compared with a cycle model: the register takes the data at a clock edge
// when load is high and glock is low, and q shows the data lines in a cycle
// with load high (same-cycle forwarding) and the stored value otherwise. The
// reset value (zero) and a load that is held off by glock are checked on their
// own. A watchdog ends a hung run.
// The operations, latencies and special-case rules checked are those of the
// described unit; the operand mix, the stimulus timing and the reference model
// are this testbench's own.
`timescale 1ns/1ps
module tb_fu_interface;
  logic clk = 0, rstx = 0, glock = 0, load = 0;
  logic [31:0] data = 0, q, model = 0;
  int checks = 0, failures = 0;

  fu_operand_reg #(.W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(32'd0, "reset value");
    rstx = 1;
    // load held off by glock
    @(negedge clk) data = 32'hdeadbeef; load = 1; glock = 1;
    #1 check(32'hdeadbeef, "forwarded while stalled");
    @(negedge clk) load = 0;
    #1 check(32'd0, "stalled load not stored");
    glock = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      load  = ($urandom % 3) == 0;
      glock = ($urandom % 5) == 0;
      data  = $urandom;
      #1 check(load ? data : model, $sformatf("cycle %0d", k));
      @(posedge clk);
      if (load && !glock) model = data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
