// tb_sharc_top: end-to-end test of the whole processor at its default
// sizes (2k-word program ROM, 10k-word data RAMs, 32-line instruction cache).
// Fixed-point core: fills its data RAM through EB, runs a 16-tap FIR as
// one dual-operand MAC per cycle (checked for value and cycle count), a
// saturating fractional MAC, a 40-bit ALU overflow, a bit-reversed read
// walk, EXP/normalise, MAX, and a 5-tap FIR over a circular delay line
// with parallel LD||MAC steps. Floating-point pipeline: the program is
// loaded into the ROM through its load port, then the pipeline runs single
// and double arithmetic, loads and stores, and a compare-and-branch loop
// from the instruction cache. Each mechanism is counted and a failure is
// recorded for any that never occurred.
module tb_sharc_top;
  import dsp_pkg::*;
  import mips_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  core_ctrl_t dsp_ctrl;
  acc_t acca, accb;
  word_t treg, eb;
  addr_t dab, cab;
  logic ovf, sat, zero, pick_b;
  logic mips_rst_n, rom_load_we, gpr_we, fcc, icache_miss, flush, retire;
  logic [15:0] rom_load_addr, dbg_daddr;
  logic [31:0] rom_load_data, gpr_wd, dbg_ddata, mpc;
  logic [4:0] gpr_wa;
  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_mac = 0, n_sat = 0, n_ovf = 0, n_bitrev = 0, n_dual = 0, n_exp = 0, n_cssu = 0, n_circ = 0, n_par = 0;
  int n_miss = 0, n_hit_loop = 0, n_flush = 0, n_retire = 0;

  sharc_top dut (
    .clk, .rst_n, .dsp_ctrl, .dsp_acca(acca), .dsp_accb(accb), .dsp_treg(treg), .dsp_eb(eb),
    .dsp_dab(dab), .dsp_cab(cab), .dsp_ovf(ovf), .dsp_sat(sat), .dsp_zero(zero), .dsp_pick_b(pick_b),
    .mips_rst_n, .rom_load_we, .rom_load_addr, .rom_load_data, .gpr_we, .gpr_wa, .gpr_wd,
    .dbg_daddr, .dbg_ddata, .mips_pc(mpc), .mips_fcc(fcc), .mips_icache_miss(icache_miss),
    .mips_flush(flush), .mips_retire(retire));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dsp_ctrl.cpu.acc_we && dsp_ctrl.cpu.acc_res == RES_MAU) n_mac++;
      if (sat) n_sat++;
      if (ovf) n_ovf++;
      if (dsp_ctrl.dag_c.mode == AM_INDIRECT && dsp_ctrl.dag_c.armod == MOD_INC0B) n_bitrev++;
      if (dsp_ctrl.dag_c.mode != AM_NONE && dsp_ctrl.dag_d.mode != AM_NONE) n_dual++;
      if (dsp_ctrl.cpu.t_exp) n_exp++;
      if (dsp_ctrl.dag_d.mode == AM_INDIRECT && dsp_ctrl.dag_d.armod inside {MOD_INCC, MOD_DECC, MOD_INC0C}) n_circ++;
      if (dsp_ctrl.cpu.mau_par && dsp_ctrl.cpu.acc_we) n_par++;
      if (dsp_ctrl.cpu.acc_we && dsp_ctrl.cpu.acc_res == RES_CSSU) n_cssu++;
    end
    if (rst_n && mips_rst_n) begin
      if (icache_miss) n_miss++;
      else if (mpc >= 32'd116 && mpc < 32'd136) n_hit_loop++;
      if (flush) n_flush++;
      if (retire) n_retire++;
    end
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // ---------------- fixed-point core helpers ----------------
  function automatic core_ctrl_t nop();
    core_ctrl_t c;
    c = '0;
    c.cpu.sxm = 1; c.cpu.alu_a = SRC_ACCA; c.cpu.alu_b = SRC_PB; c.cpu.sh_src = SRC_PB;
    c.cpu.alu_op = ALU_ADD; c.cpu.acc_res = RES_ALU;
    return c;
  endfunction
  task automatic step(core_ctrl_t c);
    dsp_ctrl = c; @(posedge clk); #1;
  endtask
  task automatic poke(int a, word_t v);
    core_ctrl_t c;
    c = nop(); c.pb = v; c.dag_d.mode = AM_ABS; c.dag_d.offs = addr_t'(a); c.mem_we = 1;
    step(c);
  endtask
  task automatic load_ar(int n, int v);
    core_ctrl_t c;
    c = nop(); c.ar_we = 1; c.ar_sel = 3'(n); c.pb = word_t'(v);
    step(c);
  endtask
  task automatic load_acc(logic dst, word_t v, int sh = 0);
    core_ctrl_t c;
    c = nop(); c.pb = v; c.cpu.sh_amt = 6'(sh); c.cpu.alu_op = ALU_PASSB; c.cpu.alu_b = SRC_SHIFT;
    c.cpu.acc_we = 1; c.cpu.acc_dst = dst;
    step(c);
  endtask

  // ---------------- MIPS helpers ----------------
  function automatic logic [31:0] lwc1(int ft, int base, int off);
    return {OP_LWC1, 5'(base), 5'(ft), 16'(off)};
  endfunction
  function automatic logic [31:0] swc1(int ft, int base, int off);
    return {OP_SWC1, 5'(base), 5'(ft), 16'(off)};
  endfunction
  function automatic logic [31:0] fop(logic [4:0] fmt, int fn, int fd, int fs, int ft);
    return enc_fr(fmt, 5'(ft), 5'(fs), 5'(fd), 6'(fn));
  endfunction
  function automatic logic [31:0] bc1(logic tf, int off);
    return {OP_COP1, FMT_BC, 4'd0, tf, 16'(off)};
  endfunction

  logic [31:0] prog [64];
  logic [31:0] A, B;
  logic [63:0] D1, D2, r;
  word_t x [16], h [16];
  longint sum;
  int t0;
  core_ctrl_t c;

  function automatic logic [31:0] rd_dram(int a);
    return dut.u_dram.mem[a];
  endfunction

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    dsp_ctrl = nop(); mips_rst_n = 0; rom_load_we = 0; rom_load_addr = 0; rom_load_data = 0;
    gpr_we = 0; gpr_wa = 0; gpr_wd = 0; dbg_daddr = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;

    // ===== fixed-point core =====
    sum = 0;
    for (int i = 0; i < 16; i++) begin
      x[i] = word_t'($urandom); h[i] = word_t'($urandom);
      poke(16'h0100 + i, x[i]); poke(16'h0200 + i, h[i]);
      sum += longint'(signed'(x[i])) * longint'(signed'(h[i]));
    end
    load_ar(1, 16'h0100); load_ar(2, 16'h0200);
    load_acc(0, 0);
    t0 = cyc;
    c = nop();
    c.dag_d.mode = AM_INDIRECT; c.dag_d.arn = 1; c.dag_d.armod = MOD_INC;
    c.dag_c.mode = AM_INDIRECT; c.dag_c.arn = 2; c.dag_c.armod = MOD_INC;
    c.cpu.mul_x = MX_DB; c.cpu.mul_y = MY_CB; c.cpu.mau_c = MC_ACCA; c.cpu.acc_res = RES_MAU; c.cpu.acc_we = 1;
    for (int i = 0; i < 16; i++) step(c);
    chk("FIR cycles", 64'(cyc - t0), 16);
    chk("FIR sum", 64'(acca), 64'(acc_t'(sum)));

    // saturating fractional MAC: A = 0x7FFF_0000 + 0.99 * 0.99 (Q15) saturates
    load_acc(0, 16'h7FFF, 16);
    c = nop(); c.cpu.frct = 1; c.cpu.ovm = 1; c.pb = 16'h7FFF; c.cpu.mul_x = MX_ACCA_HI;
    c.cpu.mul_y = MY_PB; c.cpu.mau_c = MC_ACCA; c.cpu.acc_res = RES_MAU; c.cpu.acc_we = 1;
    step(c);
    chk("SAT MAC", 64'(acca), 64'(40'h00_7FFF_FFFF));

    // 40-bit ALU overflow: B = 0x7F_FFFF_FFFF (shift in steps), + A
    load_acc(1, 16'h7FFF, 24);
    c = nop(); c.cpu.sxm = 0; c.pb = 16'hFFFF; c.cpu.sh_amt = 8; c.cpu.alu_a = SRC_ACCB; c.cpu.alu_b = SRC_SHIFT;
    c.cpu.acc_we = 1; c.cpu.acc_dst = 1; step(c);
    c = nop(); c.cpu.sxm = 0; c.pb = 16'h00FF; c.cpu.alu_a = SRC_ACCB; c.cpu.alu_b = SRC_PB;
    c.cpu.acc_we = 1; c.cpu.acc_dst = 1; step(c);
    chk("B max", 64'(accb), 64'(40'h7F_FFFF_FFFF));
    c = nop(); c.cpu.alu_a = SRC_ACCB; c.cpu.alu_b = SRC_ACCA; c.cpu.acc_we = 1; c.cpu.acc_dst = 1;
    step(c);
    chk("ALU wrap", 64'(accb), 64'(40'h7F_FFFF_FFFF + 40'h00_7FFF_FFFF));

    // MAX(A,B) -> A: B is now negative, A wins
    c = nop(); c.cpu.cssu_max = 1; c.cpu.acc_res = RES_CSSU; c.cpu.acc_we = 1; step(c);
    chk("MAX", 64'(acca), 64'(40'h00_7FFF_FFFF));

    // EXP A -> T, then normalise: 0x7FFFFFFF needs no shift
    c = nop(); c.cpu.t_exp = 1; step(c);
    chk("EXP", 64'(treg), 64'(0));

    // bit-reversed read walk of 8 words at 0x0400 on CB into B
    for (int i = 0; i < 8; i++) poke(16'h0400 + i, word_t'(i * 3));
    load_ar(0, 4); load_ar(3, 16'h0400);
    for (int i = 0; i < 8; i++) begin
      int br;
      br = {i[0], i[1], i[2]};
      c = nop(); c.dag_c.mode = AM_INDIRECT; c.dag_c.arn = 3; c.dag_c.armod = MOD_INC0B;
      c.cpu.alu_op = ALU_PASSB; c.cpu.alu_b = SRC_CB; c.cpu.acc_we = 1; c.cpu.acc_dst = 1;
      step(c);
      chk("bit-reversed read", 64'(accb), 64'(br * 3));
    end

    // circular delay line of 5 samples at 0x0500, newest at 0x0502; taps at
    // 0x0600. Each step: A <- sample (LD) || B <- B + sample * tap (MAC).
    for (int i = 0; i < 5; i++) begin
      poke(16'h0500 + i, x[i]); poke(16'h0600 + i, h[i]);
    end
    c = nop(); c.bk_we = 1; c.pb = 16'd5; step(c);
    load_ar(4, 16'h0502); load_ar(5, 16'h0600);
    load_acc(1, 0);
    sum = 0;
    for (int i = 0; i < 5; i++) sum += longint'(signed'(x[(2 + i) % 5])) * longint'(signed'(h[i]));
    c = nop();
    c.dag_d.mode = AM_INDIRECT; c.dag_d.arn = 4; c.dag_d.armod = MOD_INCC;
    c.dag_c.mode = AM_INDIRECT; c.dag_c.arn = 5; c.dag_c.armod = MOD_INC;
    c.cpu.alu_op = ALU_PASSB; c.cpu.alu_b = SRC_DB; c.cpu.acc_we = 1; c.cpu.acc_dst = 0;
    c.cpu.mul_x = MX_DB; c.cpu.mul_y = MY_CB; c.cpu.mau_c = MC_ACCB; c.cpu.mau_par = 1;
    for (int i = 0; i < 5; i++) step(c);
    chk("circular FIR", 64'(accb), 64'(acc_t'(sum)));
    chk("LD||MAC last sample", 64'(acca), 64'(acc_t'(longint'(signed'(x[1])))));
    chk("AR4 wrapped", 64'(dut.u_dsp.ar[4]), 64'(16'h0502));
    dsp_ctrl = nop();

    // ===== floating-point pipeline =====
    A = rnd_s(10); B = rnd_s(10); D1 = rnd_d(50); D2 = rnd_d(50);
    for (int i = 0; i < 64; i++) prog[i] = 0;
    n = 0;
    for (int i = 0; i < 8; i++) prog[n++] = lwc1(i < 2 ? i + 1 : i + 2, 0, 4 * i);
    prog[n++] = fop(FMT_S, 0, 8, 1, 2);
    prog[n++] = fop(FMT_S, 1, 9, 1, 2);
    prog[n++] = fop(FMT_S, 2, 10, 1, 2);
    prog[n++] = fop(FMT_S, 3, 11, 1, 2);
    prog[n++] = fop(FMT_D, 0, 12, 4, 6);
    prog[n++] = fop(FMT_D, 1, 14, 4, 6);
    prog[n++] = fop(FMT_D, 2, 16, 4, 6);
    for (int i = 0; i < 10; i++) prog[n++] = swc1(8 + i, 2, 4 * i);      // ends at 24
    prog[n++] = lwc1(21, 0, 32); prog[n++] = lwc1(22, 0, 36);           // 25, 26
    prog[n++] = 0; prog[n++] = 0;
    prog[n++] = fop(FMT_S, 0, 20, 20, 21);                              // 29 L (byte 116)
    prog[n++] = 0; prog[n++] = 0;
    prog[n++] = fop(FMT_S, 6'h32, 0, 20, 22);                           // c.lt.s
    prog[n++] = bc1(1, 29 - 34);                                        // bc1t L
    prog[n++] = swc1(20, 2, 40);
    // program ROM load, pipeline held in reset
    for (int i = 0; i < 64; i++) begin
      rom_load_we = 1; rom_load_addr = 16'(i); rom_load_data = prog[i]; @(posedge clk); #1;
    end
    rom_load_we = 0;
    // operands are placed in the floating-point data RAM directly
    dut.u_dram.mem[0] = A; dut.u_dram.mem[1] = B;
    dut.u_dram.mem[2] = D1[31:0]; dut.u_dram.mem[3] = D1[63:32];
    dut.u_dram.mem[4] = D2[31:0]; dut.u_dram.mem[5] = D2[63:32];
    dut.u_dram.mem[8] = 32'h3F800000; dut.u_dram.mem[9] = 32'h41200000;   // 1.0, 10.0
    for (int i = 64; i < 80; i++) dut.u_dram.mem[i] = 0;
    mips_rst_n = 1;
    gpr_we = 1; gpr_wa = 2; gpr_wd = 32'h100; @(posedge clk); #1; gpr_we = 0;
    repeat (200) @(posedge clk); #1;

    chk("add.s", 64'(rd_dram(64)), 64'(rs(sr(A) + sr(B))));
    chk("sub.s", 64'(rd_dram(65)), 64'(rs(sr(A) - sr(B))));
    chk("mul.s", 64'(rd_dram(66)), 64'(rs(sr(A) * sr(B))));
    chk("div.s", 64'(rd_dram(67)), 64'(rs(sr(A) / sr(B))));
    r = $realtobits($bitstoreal(D1) + $bitstoreal(D2));
    chk("add.d", {rd_dram(69), rd_dram(68)}, r);
    r = $realtobits($bitstoreal(D1) - $bitstoreal(D2));
    chk("sub.d", {rd_dram(71), rd_dram(70)}, r);
    r = $realtobits($bitstoreal(D1) * $bitstoreal(D2));
    chk("mul.d", {rd_dram(73), rd_dram(72)}, r);
    chk("loop", 64'(rd_dram(74)), 64'(32'h41200000));
    dbg_daddr = 16'd74; #1;
    chk("debug read port", 64'(dbg_ddata), 64'(32'h41200000));

    $display("mechanisms: mac=%0d sat=%0d ovf=%0d bitrev=%0d dual=%0d exp=%0d cssu=%0d circ=%0d par=%0d miss=%0d loop_hits=%0d flush=%0d retired=%0d",
             n_mac, n_sat, n_ovf, n_bitrev, n_dual, n_exp, n_cssu, n_circ, n_par, n_miss, n_hit_loop, n_flush, n_retire);
    checks++; if (n_circ == 0)   begin failures++; $display("FAIL no circular addressing"); end
    checks++; if (n_par == 0)    begin failures++; $display("FAIL no parallel LD||MAC"); end
    checks++; if (n_mac == 0 || n_dual == 0) begin failures++; $display("FAIL no dual-operand MAC"); end
    checks++; if (n_sat == 0)    begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_ovf == 0)    begin failures++; $display("FAIL no ALU overflow"); end
    checks++; if (n_bitrev == 0) begin failures++; $display("FAIL no bit-reversed addressing"); end
    checks++; if (n_exp == 0)    begin failures++; $display("FAIL no exponent encode"); end
    checks++; if (n_cssu == 0)   begin failures++; $display("FAIL no compare-select"); end
    checks++; if (n_miss == 0)   begin failures++; $display("FAIL no cache miss"); end
    checks++; if (n_hit_loop == 0) begin failures++; $display("FAIL no loop from cache"); end
    checks++; if (n_flush != 9)  begin failures++; $display("FAIL flushes %0d, expected 9", n_flush); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
