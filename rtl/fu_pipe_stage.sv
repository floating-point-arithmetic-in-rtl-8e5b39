// fu_pipe_stage: one pipeline register of a function unit, with a valid bit.
//
// A valid token travels with each operation. The register is written only when
// a valid operation arrives. So an idle unit does not toggle, and the last
// stage of a unit holds its result until a later operation overwrites it. That
// is the behaviour the processor expects of an output register. With BYPASS set,
// the stage is a plain wire. This is how the FMA's latency is set by its
// bypass_N parameters. The whole pipeline freezes while `glock` is high.
// Reset clears the valid bit and the data.
module fu_pipe_stage #(
  parameter int unsigned W      = 32,
  parameter bit          BYPASS = 1'b0
) (
  input  logic         clk,
  input  logic         rstx,
  input  logic         glock,
  input  logic         vin,
  input  logic [W-1:0] din,
  output logic         vout,
  output logic [W-1:0] dout
);
  if (BYPASS) begin : g_wire
    assign vout = vin;
    assign dout = din;
  end else begin : g_reg
    always_ff @(posedge clk or negedge rstx) begin
      if (!rstx) begin
        vout <= 1'b0;
        dout <= '0;
      end else if (!glock) begin
        vout <= vin;
        if (vin) dout <= din;
      end
    end
  end
endmodule
