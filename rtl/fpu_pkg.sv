// fpu_pkg: operation codes and shared constants of the floating-point
// function units (FUs).
//
// Each FU takes its operation code on the trigger port together with the
// trigger data. The codes of every FU are numbered in alphabetical order of the
// operation names. That ordering rule comes from the processor toolset the units
// are written for. It is why the single- and half-precision comparators order
// their last two operations differently (NEF < NEGF, but NEGH < NEH).
// Each unit's opcode width is the smallest that holds its operations.
package fpu_pkg;

  // fpu_sp_add_sub / fpadd_fpsub
  typedef enum logic [0:0] {OP_ADD = 1'b0, OP_SUB = 1'b1} addsub_op_e;

  // fpu_sp_compare: ABSF EQF GEF GTF LEF LTF NEF NEGF
  typedef enum logic [2:0] {
    CMP_ABS = 3'd0, CMP_EQ = 3'd1, CMP_GE = 3'd2, CMP_GT = 3'd3,
    CMP_LE  = 3'd4, CMP_LT = 3'd5, CMP_NE = 3'd6, CMP_NEG = 3'd7
  } cmp_op_e;

  // fpu_hp_compare: ABSH EQH GEH GTH LEH LTH NEGH NEH (NEG and NE swapped)
  localparam logic [2:0] HCMP_NEG = 3'd6;
  localparam logic [2:0] HCMP_NE  = 3'd7;

  // fpu_sp_convert: CFI CFIU CIF CIFU
  typedef enum logic [1:0] {
    CVT_CFI = 2'd0, CVT_CFIU = 2'd1, CVT_CIF = 2'd2, CVT_CIFU = 2'd3
  } cvt_op_e;

  // fpu_sp_mac_v2 / fpmac_v2: ADD MAC MSU MUL SUB
  typedef enum logic [2:0] {
    MAC_ADD = 3'd0, MAC_MAC = 3'd1, MAC_MSU = 3'd2, MAC_MUL = 3'd3, MAC_SUB = 3'd4
  } mac_op_e;

  // fpu_chf_cfh: CFH (single to half), CHF (half to single)
  typedef enum logic [0:0] {FH_CFH = 1'b0, FH_CHF = 1'b1} fh_op_e;

  // fpu_sp_accel: INITDIV INITSQRT MULP2 RECIPA RSQRTA
  typedef enum logic [2:0] {
    ACC_INITDIV = 3'd0, ACC_INITSQRT = 3'd1, ACC_MULP2 = 3'd2,
    ACC_RECIPA  = 3'd3, ACC_RSQRTA   = 3'd4
  } acc_op_e;

  // Index of each unit in the fpu_suite port arrays.
  localparam int unsigned FU_ADD   = 0;
  localparam int unsigned FU_MUL   = 1;
  localparam int unsigned FU_DIV   = 2;
  localparam int unsigned FU_SQRT  = 3;
  localparam int unsigned FU_CMP   = 4;
  localparam int unsigned FU_CONV  = 5;
  localparam int unsigned FU_MAC   = 6;
  localparam int unsigned FU_ACC   = 7;
  localparam int unsigned FU_HADD  = 8;
  localparam int unsigned FU_HMUL  = 9;
  localparam int unsigned FU_HISQ  = 10;
  localparam int unsigned FU_FH    = 11;
  localparam int unsigned FU_HCMP  = 12;
  localparam int unsigned FU_HMAC  = 13;
  localparam int unsigned NUM_FU   = 14;

  // One function unit's input ports as seen from the interconnection network:
  // trigger port t1 (with operation code) and operand ports o1 and o2.
  typedef struct packed {
    logic        t1load;
    logic [2:0]  t1opcode;
    logic [31:0] t1data;
    logic        o1load;
    logic [31:0] o1data;
    logic        o2load;
    logic [31:0] o2data;
  } fu_req_t;

endpackage
