// fu_operand_reg: one operand port of a function unit.
//
// The port's register is written whenever the interconnect raises `load`; the
// data lines are ignored otherwise, since they may be shared with other users of
// a bus. `q` is the value the operation sees when it is triggered: the data on
// the lines if the operand is moved in the same cycle as the trigger, else the
// value held in the register. This follows the function-unit semantics of the
// processor template. The same-cycle forwarding is this design's own choice.
// The register clears on the active-low asynchronous reset and holds while
// `glock` (global lock, a processor stall) is high.
module fu_operand_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rstx,
  input  logic         glock,
  input  logic         load,
  input  logic [W-1:0] data,
  output logic [W-1:0] q
);
  logic [W-1:0] r;

  always_ff @(posedge clk or negedge rstx) begin
    if (!rstx)                r <= '0;
    else if (load && !glock)  r <= data;
  end

  assign q = load ? data : r;
endmodule
