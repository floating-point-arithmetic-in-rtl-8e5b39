// fu_delay: a chain of N fu_pipe_stage registers (N >= 1).
//
// It is used where a unit's latency is longer than its logic needs, so that the
// synthesis tool can retime the registers into the logic in front of them. It
// also gives the output register as its last stage.
module fu_delay #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rstx,
  input  logic         glock,
  input  logic         vin,
  input  logic [W-1:0] din,
  output logic         vout,
  output logic [W-1:0] dout
);
  logic         v [N+1];
  logic [W-1:0] d [N+1];
  assign v[0] = vin;
  assign d[0] = din;
  for (genvar i = 0; i < N; i++) begin : g_st
    fu_pipe_stage #(.W(W)) u_st (
      .clk, .rstx, .glock, .vin(v[i]), .din(d[i]), .vout(v[i+1]), .dout(d[i+1])
    );
  end
  assign vout = v[N];
  assign dout = d[N];
endmodule
