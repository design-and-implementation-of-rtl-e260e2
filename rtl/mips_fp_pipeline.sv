// mips_fp_pipeline: five-stage MIPS pipeline executing the floating-point
// instruction set: add/sub/mul/div.s, add/sub/mul.d, c.cond.s/.d (eq, ne,
// lt, le, gt, ge), lwc1, swc1, bc1t, bc1f. Any other word executes as a NOP.
//
// Stages, as in the classic MIPS pipeline:
//   IF   PC (pagen) -> instruction cache -> IF/ID. A cache miss refills
//        from program memory and stalls IF for one cycle (bubble into ID).
//   ID   decode; read the FP register file (pairs for doubles) and the
//        integer base register; sign-extend the immediate.
//   EX   floating-point add/sub, multiply, divide and compare units; the
//        address adder (base + offset) and the branch target adder
//        (PC + 4 + offset * 4); the compare writes the FP condition flag.
//   MEM  data memory read (lwc1) or write (swc1); a taken branch selects
//        the next PC here, from the EX/MEM register, as in the classic
//        datapath, and squashes the three younger instructions.
//   WB   write the result or loaded word into the FP register file.
//
// True to "microprocessor without interlocked pipeline stages", there is no
// hazard detection and no forwarding network: the register file writes in
// the first half of a cycle and reads in the second, so a result can be used
// by the third instruction after its producer; code must place independent
// instructions or NOPs in between. The condition flag is written at the end
// of EX, so a branch may directly follow its compare.
// The document names the instructions and the stages. Squashing on a
// taken branch (rather than delay slots), the compare encoding (mips_pkg)
// and the integer register file loaded through a port (the document lists
// no integer instructions that would write it) are this design's choices.
module mips_fp_pipeline
  import mips_pkg::*;
#(
  parameter int unsigned ICACHE_LINES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // program memory (through the instruction cache)
  output logic [15:0] pmem_addr,     // word address
  input  logic [31:0] pmem_data,
  // data memory
  output logic [15:0] dmem_addr,     // word address
  output logic        dmem_we,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // integer register load port (base registers of lwc1/swc1)
  input  logic        gpr_we,
  input  logic [4:0]  gpr_wa,
  input  logic [31:0] gpr_wd,
  // status
  output logic [31:0] pc,
  output logic        fcc,           // FP condition flag
  output logic        icache_miss,   // IF stalled on a refill this cycle
  output logic        flush,         // taken branch squashes younger instructions
  output logic        retire         // an instruction leaves WB this cycle
);
  ifid_t  ifid, ifid_n;
  idex_t  idex, idex_n;
  exmem_t exmem, exmem_n;
  memwb_t memwb, memwb_n;

  // ---------------- IF ----------------
  logic [31:0] pc4, instr;
  logic        hit, pmem_rd;
  logic [29:0] pmem_a30;

  pagen u_pagen (.clk, .rst_n, .stall(!hit), .redirect(flush), .target(exmem.target),
                 .pc, .pc_plus4(pc4));

  icache #(.LINES(ICACHE_LINES), .AW(30)) u_icache (
    .clk, .rst_n, .req(1'b1), .addr(pc[31:2]), .instr, .hit,
    .mem_addr(pmem_a30), .mem_rd(pmem_rd), .mem_data(pmem_data), .miss(icache_miss));
  assign pmem_addr = pmem_a30[15:0];

  assign flush = exmem.valid && exmem.taken;

  always_comb begin
    ifid_n.valid = hit;
    ifid_n.instr = instr;
    ifid_n.pc4   = pc4;
  end

  // ---------------- ID ----------------
  logic [31:0] gpr [32];
  logic [31:0] fs1, fs2;
  logic [63:0] fd1, fd2;
  logic [5:0]  opc, fn;
  logic [4:0]  fmt, ft, fs, fdf, rs;

  assign opc = ifid.instr[31:26];
  assign fmt = ifid.instr[25:21];
  assign rs  = ifid.instr[25:21];
  assign ft  = ifid.instr[20:16];
  assign fs  = ifid.instr[15:11];
  assign fdf = ifid.instr[10:6];
  assign fn  = ifid.instr[5:0];

  logic        wb_we;
  fp_regfile u_rf (.clk, .rst_n, .ra1(fs), .ra2(ft), .rs1(fs1), .rs2(fs2), .rd1(fd1), .rd2(fd2),
                   .we(wb_we), .wdbl(memwb.dbl), .wa(memwb.fd), .wd(memwb.val));

  always_comb begin
    idex_n       = '0;
    idex_n.valid = ifid.valid;
    idex_n.op    = OPK_NOP;
    idex_n.dbl   = fmt == FMT_D;
    idex_n.cond  = fn[2:0];
    idex_n.tf    = ft[0];
    idex_n.fd    = fdf;
    idex_n.fa    = (fmt == FMT_D) ? fd1 : {32'd0, fs1};
    idex_n.fb    = (fmt == FMT_D) ? fd2 : {32'd0, fs2};
    idex_n.base  = (rs == 0) ? 32'd0 : gpr[rs];
    idex_n.imm   = 32'(signed'(ifid.instr[15:0]));
    idex_n.pc4   = ifid.pc4;
    if (opc == OP_COP1) begin
      if (fmt == FMT_BC) idex_n.op = OPK_BC1;
      else if (fmt == FMT_S || fmt == FMT_D) begin
        if (fn == FN_ADD)                    idex_n.op = OPK_ADD;
        else if (fn == FN_SUB)               idex_n.op = OPK_SUB;
        else if (fn == FN_MUL)               idex_n.op = OPK_MUL;
        else if (fn == FN_DIV && fmt == FMT_S) idex_n.op = OPK_DIV;
        else if (fn[5:3] == FN_CMP_HI && fn[2:0] <= 3'd5) idex_n.op = OPK_CMP;
      end
    end else if (opc == OP_LWC1) begin
      idex_n.op  = OPK_LWC1;
      idex_n.dbl = 1'b0;
      idex_n.fd  = ft;
    end else if (opc == OP_SWC1) begin
      idex_n.op  = OPK_SWC1;
      idex_n.dbl = 1'b0;
      idex_n.fb  = {32'd0, fs2};
    end
    if (!ifid.valid) idex_n.op = OPK_NOP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 32; i++) gpr[i] <= '0;
    else if (gpr_we && gpr_wa != 0) gpr[gpr_wa] <= gpr_wd;
  end

  // ---------------- EX ----------------
  logic [31:0] s_add, s_mul, s_div;
  logic [63:0] d_add, d_mul;
  logic        c_s, c_d;

  fp_addsub #(.EW(8),  .FW(23)) u_adds (.a(idex.fa[31:0]), .b(idex.fb[31:0]), .sub(idex.op == OPK_SUB), .y(s_add));
  fp_addsub #(.EW(11), .FW(52)) u_addd (.a(idex.fa), .b(idex.fb), .sub(idex.op == OPK_SUB), .y(d_add));
  fp_mul    #(.EW(8),  .FW(23)) u_muls (.a(idex.fa[31:0]), .b(idex.fb[31:0]), .y(s_mul));
  fp_mul    #(.EW(11), .FW(52)) u_muld (.a(idex.fa), .b(idex.fb), .y(d_mul));
  fp_div    #(.EW(8),  .FW(23)) u_divs (.a(idex.fa[31:0]), .b(idex.fb[31:0]), .y(s_div));
  fp_cmp    #(.EW(8),  .FW(23)) u_cmps (.a(idex.fa[31:0]), .b(idex.fb[31:0]), .cond(idex.cond), .y(c_s));
  fp_cmp    #(.EW(11), .FW(52)) u_cmpd (.a(idex.fa), .b(idex.fb), .cond(idex.cond), .y(c_d));

  always_comb begin
    exmem_n        = '0;
    exmem_n.valid  = idex.valid;
    exmem_n.dbl    = idex.dbl;
    exmem_n.fd     = idex.fd;
    exmem_n.addr   = idex.base + idex.imm;
    exmem_n.sdata  = idex.fb[31:0];
    exmem_n.target = idex.pc4 + (idex.imm << 2);
    unique case (idex.op)
      OPK_ADD, OPK_SUB: begin exmem_n.wb = 1'b1; exmem_n.res = idex.dbl ? d_add : {32'd0, s_add}; end
      OPK_MUL:          begin exmem_n.wb = 1'b1; exmem_n.res = idex.dbl ? d_mul : {32'd0, s_mul}; end
      OPK_DIV:          begin exmem_n.wb = 1'b1; exmem_n.res = {32'd0, s_div}; end
      OPK_LWC1:         begin exmem_n.wb = 1'b1; exmem_n.load = 1'b1; end
      OPK_SWC1:         exmem_n.store = 1'b1;
      OPK_BC1:          exmem_n.taken = (fcc == idex.tf);
      default:          ;
    endcase
    if (!idex.valid) begin
      exmem_n.wb = 1'b0; exmem_n.load = 1'b0; exmem_n.store = 1'b0; exmem_n.taken = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fcc <= 1'b0;
    else if (idex.valid && idex.op == OPK_CMP && !flush) fcc <= idex.dbl ? c_d : c_s;
  end

  // ---------------- MEM ----------------
  assign dmem_addr  = exmem.addr[17:2];
  assign dmem_we    = exmem.valid && exmem.store;
  assign dmem_wdata = exmem.sdata;

  always_comb begin
    memwb_n.valid = exmem.valid;
    memwb_n.wb    = exmem.valid && exmem.wb;
    memwb_n.dbl   = exmem.dbl;
    memwb_n.fd    = exmem.fd;
    memwb_n.val   = exmem.load ? {32'd0, dmem_rdata} : exmem.res;
  end

  // ---------------- WB ----------------
  assign wb_we  = memwb.valid && memwb.wb;
  assign retire = memwb.valid;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ifid  <= '0;
      idex  <= '0;
      exmem <= '0;
      memwb <= '0;
    end else begin
      ifid  <= flush ? '0 : ifid_n;
      idex  <= flush ? '0 : idex_n;
      exmem <= flush ? '0 : exmem_n;
      memwb <= memwb_n;
    end
  end

  logic unused;
  assign unused = pmem_rd ^ ^pmem_a30[29:16] ^ ^exmem.addr[31:18] ^ ^exmem.addr[1:0];
endmodule
