// fpu_suite: every floating-point function unit of the suite side by side, as
// a processor built from this hardware database would hold them.
//
// Each unit is a separate function unit of a transport-triggered processor.
// The interconnection network, register files and control that would move data
// between them come from the processor generator and are not part of this
// design. Their side of each unit is brought out as ports. req[i] carries unit
// i's port writes (trigger t1 with operation code, operands o1 and o2), and
// r1[i] is unit i's result register. The accelerator's second and third results
// are on acc_r2 and acc_r3. Index constants FU_* are in fpu_pkg. Half-precision
// units use the low 16 bits of the 32-bit buses, and their results are
// zero-extended. All units share the clock, the active-low asynchronous reset
// rstx and the global lock glock, which stalls every unit while high.
//
// Units and their default latencies (cycles from trigger to result):
//   single precision: add/sub 5, mul 5, div 15, sqrt 26, compare 1, convert 4,
//                     fused multiply-add 6 (2..6 with bypass flags),
//                     division/square-root accelerator 1
//   half precision:   add/sub 2, mul 2, inverse square root 5,
//                     single/half converter 1, compare 1, fused multiply-add 6
module fpu_suite
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rstx,
  input  logic        glock,
  input  fu_req_t     req [NUM_FU],
  output logic [31:0] r1  [NUM_FU],
  output logic [31:0] acc_r2,
  output logic [31:0] acc_r3
);
  logic [15:0] hr [NUM_FU];

  fpu_sp_add_sub u_add (
    .clk, .rstx, .glock,
    .t1data(req[FU_ADD].t1data), .t1load(req[FU_ADD].t1load), .t1opcode(req[FU_ADD].t1opcode[0:0]),
    .o1data(req[FU_ADD].o1data), .o1load(req[FU_ADD].o1load), .r1data(r1[FU_ADD])
  );

  fpu_sp_mul u_mul (
    .clk, .rstx, .glock,
    .t1data(req[FU_MUL].t1data), .t1load(req[FU_MUL].t1load),
    .o1data(req[FU_MUL].o1data), .o1load(req[FU_MUL].o1load), .r1data(r1[FU_MUL])
  );

  fpu_sp_div u_div (
    .clk, .rstx, .glock,
    .t1data(req[FU_DIV].t1data), .t1load(req[FU_DIV].t1load),
    .o1data(req[FU_DIV].o1data), .o1load(req[FU_DIV].o1load), .r1data(r1[FU_DIV])
  );

  fpu_sp_sqrt u_sqrt (
    .clk, .rstx, .glock,
    .t1data(req[FU_SQRT].t1data), .t1load(req[FU_SQRT].t1load), .r1data(r1[FU_SQRT])
  );

  fpu_sp_compare u_cmp (
    .clk, .rstx, .glock,
    .t1data(req[FU_CMP].t1data), .t1load(req[FU_CMP].t1load), .t1opcode(req[FU_CMP].t1opcode),
    .o1data(req[FU_CMP].o1data), .o1load(req[FU_CMP].o1load), .r1data(r1[FU_CMP])
  );

  fpu_sp_convert u_conv (
    .clk, .rstx, .glock,
    .t1data(req[FU_CONV].t1data), .t1load(req[FU_CONV].t1load), .t1opcode(req[FU_CONV].t1opcode[1:0]),
    .r1data(r1[FU_CONV])
  );

  fpu_sp_mac_v2 u_mac (
    .clk, .rstx, .glock,
    .t1data(req[FU_MAC].t1data), .t1load(req[FU_MAC].t1load), .t1opcode(req[FU_MAC].t1opcode),
    .o1data(req[FU_MAC].o1data), .o1load(req[FU_MAC].o1load),
    .o2data(req[FU_MAC].o2data), .o2load(req[FU_MAC].o2load), .r1data(r1[FU_MAC])
  );

  fpu_sp_accel u_acc (
    .clk, .rstx, .glock,
    .t1data(req[FU_ACC].t1data), .t1load(req[FU_ACC].t1load), .t1opcode(req[FU_ACC].t1opcode),
    .o1data(req[FU_ACC].o1data), .o1load(req[FU_ACC].o1load),
    .r1data(r1[FU_ACC]), .r2data(acc_r2), .r3data(acc_r3)
  );

  fpadd_fpsub u_hadd (
    .clk, .rstx, .glock,
    .t1data(req[FU_HADD].t1data[15:0]), .t1load(req[FU_HADD].t1load), .t1opcode(req[FU_HADD].t1opcode[0:0]),
    .o1data(req[FU_HADD].o1data[15:0]), .o1load(req[FU_HADD].o1load), .r1data(hr[FU_HADD])
  );

  fpmul u_hmul (
    .clk, .rstx, .glock,
    .t1data(req[FU_HMUL].t1data[15:0]), .t1load(req[FU_HMUL].t1load),
    .o1data(req[FU_HMUL].o1data[15:0]), .o1load(req[FU_HMUL].o1load), .r1data(hr[FU_HMUL])
  );

  invsqrth u_hisq (
    .clk, .rstx, .glock,
    .t1data(req[FU_HISQ].t1data[15:0]), .t1load(req[FU_HISQ].t1load), .r1data(hr[FU_HISQ])
  );

  fpu_chf_cfh u_fh (
    .clk, .rstx, .glock,
    .t1data(req[FU_FH].t1data), .t1load(req[FU_FH].t1load), .t1opcode(req[FU_FH].t1opcode[0:0]),
    .r1data(r1[FU_FH])
  );

  fpu_hp_compare u_hcmp (
    .clk, .rstx, .glock,
    .t1data(req[FU_HCMP].t1data), .t1load(req[FU_HCMP].t1load), .t1opcode(req[FU_HCMP].t1opcode),
    .o1data(req[FU_HCMP].o1data), .o1load(req[FU_HCMP].o1load), .r1data(r1[FU_HCMP])
  );

  fpmac_v2 u_hmac (
    .clk, .rstx, .glock,
    .t1data(req[FU_HMAC].t1data[15:0]), .t1load(req[FU_HMAC].t1load), .t1opcode(req[FU_HMAC].t1opcode),
    .o1data(req[FU_HMAC].o1data[15:0]), .o1load(req[FU_HMAC].o1load),
    .o2data(req[FU_HMAC].o2data[15:0]), .o2load(req[FU_HMAC].o2load), .r1data(hr[FU_HMAC])
  );

  assign r1[FU_HADD] = {16'h0, hr[FU_HADD]};
  assign r1[FU_HMUL] = {16'h0, hr[FU_HMUL]};
  assign r1[FU_HISQ] = {16'h0, hr[FU_HISQ]};
  assign r1[FU_HMAC] = {16'h0, hr[FU_HMAC]};

  // Unused entries of the 16-bit result array.
  for (genvar i = 0; i < NUM_FU; i++) begin : g_hr
    if (i != FU_HADD && i != FU_HMUL && i != FU_HISQ && i != FU_HMAC) begin : g_tie
      assign hr[i] = '0;
    end
  end
endmodule
