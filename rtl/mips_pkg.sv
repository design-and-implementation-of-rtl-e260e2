// mips_pkg: instruction fields, opcodes and pipeline-register types of the
// MIPS floating-point pipeline. Formats (R, I, J) are the MIPS ones: opcode
// in bits 31:26, then rs, rt, rd, shamt, funct, or a 16-bit immediate, or a
// 26-bit address. Floating-point arithmetic uses the coprocessor-1 layout of
// the R format: fmt in the rs field, ft in rt, fs in rd, fd in shamt.
// Opcode values follow the MIPS architecture (COP1 = 0x11, LWC1 = 0x31,
// SWC1 = 0x39, fmt S = 0x10, D = 0x11, BC = 0x08; add/sub/mul/div funct
// 0..3). The compare funct 0b110ccc with the condition code ccc
// (0 eq, 1 ne, 2 lt, 3 le, 4 gt, 5 ge) is this design's own, since the
// processor offers all six conditions.
package mips_pkg;

  localparam logic [5:0] OP_COP1 = 6'h11;
  localparam logic [5:0] OP_LWC1 = 6'h31;
  localparam logic [5:0] OP_SWC1 = 6'h39;
  localparam logic [4:0] FMT_S   = 5'h10;
  localparam logic [4:0] FMT_D   = 5'h11;
  localparam logic [4:0] FMT_BC  = 5'h08;
  localparam logic [5:0] FN_ADD  = 6'd0;
  localparam logic [5:0] FN_SUB  = 6'd1;
  localparam logic [5:0] FN_MUL  = 6'd2;
  localparam logic [5:0] FN_DIV  = 6'd3;
  localparam logic [2:0] FN_CMP_HI = 3'b110;

  typedef enum logic [3:0] {
    OPK_NOP, OPK_ADD, OPK_SUB, OPK_MUL, OPK_DIV, OPK_CMP, OPK_LWC1, OPK_SWC1, OPK_BC1
  } opk_e;

  typedef struct packed {
    logic        valid;
    logic [31:0] instr;
    logic [31:0] pc4;
  } ifid_t;

  typedef struct packed {
    logic        valid;
    opk_e        op;
    logic        dbl;       // double precision
    logic [2:0]  cond;      // compare condition
    logic        tf;        // bc1t (1) / bc1f (0)
    logic [4:0]  fd;        // destination register
    logic [63:0] fa;        // fs operand (pair for doubles)
    logic [63:0] fb;        // ft operand
    logic [31:0] base;      // integer base register for lwc1/swc1
    logic [31:0] imm;       // sign-extended immediate
    logic [31:0] pc4;
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic        wb;        // writes a floating-point register
    logic        dbl;
    logic [4:0]  fd;
    logic [63:0] res;
    logic        load;
    logic        store;
    logic [31:0] addr;      // byte address
    logic [31:0] sdata;
    logic        taken;     // branch taken
    logic [31:0] target;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        wb;
    logic        dbl;
    logic [4:0]  fd;
    logic [63:0] val;
  } memwb_t;

  function automatic logic [31:0] enc_fr(logic [4:0] fmt, logic [4:0] ft, logic [4:0] fs,
                                         logic [4:0] fd, logic [5:0] fn);
    return {OP_COP1, fmt, ft, fs, fd, fn};
  endfunction

endpackage
