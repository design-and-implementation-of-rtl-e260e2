// dsp_pkg: widths, operation codes and the decoded control word of the
// fixed-point DSP core (CPU of the accumulator/MAU/ALU/shifter datapath and
// its data address generator).
//
// The 40-bit accumulator (8 guard + 16 high + 16 low bits), the 17x17
// multiplier and the 16-bit buses PB/CB/DB/EB follow the document. The
// fixed-point instruction encoding is not given, so the core is driven by the
// decoded control word below; its fields and codes are this design's own.
package dsp_pkg;

  localparam int unsigned DW    = 16;  // data bus width (PB15..PB0, CB, DB, EB)
  localparam int unsigned ACCW  = 40;  // accumulator width
  localparam int unsigned AW    = 16;  // data address width (64k word space)
  localparam int unsigned NAR   = 8;   // auxiliary registers AR0..AR7

  typedef logic [ACCW-1:0] acc_t;
  typedef logic [DW-1:0]   word_t;
  typedef logic [AW-1:0]   addr_t;

  // ---------------- CPU ----------------
  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB, ALU_NOT
  } alu_op_e;

  typedef enum logic [2:0] {
    SRC_CB, SRC_DB, SRC_PB, SRC_ACCA, SRC_ACCB, SRC_SHIFT, SRC_ZERO
  } src_e;

  typedef enum logic [1:0] { MX_T, MX_DB, MX_ACCA_HI } mul_x_e;
  typedef enum logic [1:0] { MY_CB, MY_DB, MY_PB } mul_y_e;
  typedef enum logic [1:0] { MC_ZERO, MC_ACCA, MC_ACCB } mau_c_e;
  typedef enum logic [1:0] { RES_ALU, RES_MAU, RES_SHIFT, RES_CSSU } res_e;

  typedef struct packed {
    // mode bits (named as in the status register trace: frct, sxm, ovm)
    logic       frct;      // fractional multiply: product shifted left by one
    logic       sxm;       // sign-extend 16-bit operands (else zero-extend)
    logic       ovm;       // saturate results to the 32-bit range
    // T register
    logic       t_load;    // T <= DB
    logic       t_exp;     // T <= exponent of the accumulator picked by exp_b
    logic       exp_b;     // exponent encoder source: 0 ACCA, 1 ACCB
    // MAU
    mul_x_e     mul_x;
    mul_y_e     mul_y;
    mau_c_e     mau_c;
    logic       mau_neg;   // subtract the product (MAS)
    logic       mau_rnd;   // round to the high word
    // ALU
    alu_op_e    alu_op;
    src_e       alu_a;     // SRC_ACCA, SRC_ACCB, SRC_DB, SRC_ZERO
    src_e       alu_b;     // any source
    // barrel shifter
    src_e       sh_src;    // SRC_CB, SRC_DB, SRC_ACCA, SRC_ACCB
    logic signed [5:0] sh_amt; // -16..31, positive = left
    logic       sh_arith;  // arithmetic (1) or logical (0) right shift
    logic       sh_msw;    // EB gets bits 31:16 of the shifter output (else 15:0)
    // CSSU
    logic       cssu_max;  // 1 MAX, 0 MIN of ACCA and ACCB
    // result write
    logic       acc_we;
    logic       acc_dst;   // 0 ACCA, 1 ACCB
    res_e       acc_res;
    logic       mau_par;   // parallel LD||MAC: the other accumulator takes the MAU result
  } cpu_ctrl_t;

  // ---------------- data address generator ----------------
  typedef enum logic [2:0] {
    AM_NONE, AM_ABS, AM_DIRECT, AM_INDIRECT, AM_MMR, AM_PUSH, AM_POP
  } amode_e;

  typedef enum logic [3:0] {
    MOD_NONE, MOD_INC, MOD_DEC, MOD_INC0, MOD_DEC0, MOD_INC0B, MOD_DEC0B,
    MOD_INCC, MOD_DECC, MOD_INC0C    // circular (modulo BK) post-modify
  } armod_e;

  typedef struct packed {
    amode_e     mode;
    logic [2:0] arn;      // auxiliary register used by indirect addressing
    armod_e     armod;    // post-modification of ARn
    addr_t      offs;     // absolute address, or 7-bit offset for direct/MMR
  } dag_ctrl_t;

  typedef struct packed {
    dag_ctrl_t  dag_d;    // ARAU 0: address on DAB (read on DB, write on EB)
    dag_ctrl_t  dag_c;    // ARAU 1: address on CAB (read on CB)
    logic       mem_we;   // write EB to the DAB address
    word_t      pb;       // immediate operand from the program bus
    logic       ar_we;    // load AR[ar_sel] from pb
    logic [2:0] ar_sel;
    logic       dp_we;    // load DP from pb[8:0]
    logic       sp_we;    // load SP from pb
    logic       bk_we;    // load the circular buffer size BK from pb
    cpu_ctrl_t  cpu;
  } core_ctrl_t;

endpackage
