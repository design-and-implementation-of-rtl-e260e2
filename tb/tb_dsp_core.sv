// tb_dsp_core: runs an N-tap FIR dot product on the core. Samples x[] sit
// in data RAM at 0x0100 and coefficients h[] at 0x0200; AR1 and AR2 walk
// them with post-increment, both operands are read in the same cycle (DB
// and CB) and one MAC per cycle accumulates into A. The result must equal
// the software sum and take exactly N cycles. It then stores the rounded
// high word of A through EB to 0x0300, reads it back, and reorders an
// 8-word buffer in bit-reversed order through the RAM.
module tb_dsp_core;
  import dsp_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  core_ctrl_t ctrl;
  acc_t acca, accb;
  word_t treg, eb;
  addr_t dab, cab;
  logic ovf, sat, zero, pick_b;
  int checks = 0, failures = 0;

  dsp_core dut (.clk, .rst_n, .ctrl, .acca, .accb, .treg, .eb, .dab, .cab, .ovf, .sat, .zero, .pick_b);

  always #5 clk = ~clk;

  function automatic core_ctrl_t nop();
    core_ctrl_t c;
    c = '0;
    c.cpu.sxm = 1; c.cpu.alu_a = SRC_ACCA; c.cpu.alu_b = SRC_PB; c.cpu.sh_src = SRC_PB;
    c.cpu.alu_op = ALU_ADD; c.cpu.acc_res = RES_ALU;
    return c;
  endfunction

  task automatic step(core_ctrl_t c);
    ctrl = c; @(posedge clk); #1;
  endtask

  // store a word through the datapath: EB = PB (shift 0), written at absolute address
  task automatic poke(int a, word_t v);
    core_ctrl_t c;
    c = nop(); c.pb = v; c.cpu.sh_src = SRC_PB; c.cpu.sh_amt = 0;
    c.dag_d.mode = AM_ABS; c.dag_d.offs = addr_t'(a); c.mem_we = 1;
    step(c);
  endtask

  task automatic load_ar(int n, int v);
    core_ctrl_t c;
    c = nop(); c.ar_we = 1; c.ar_sel = 3'(n); c.pb = word_t'(v);
    step(c);
  endtask

  word_t x [N], h [N];
  longint sum;
  int t0, cyc;
  core_ctrl_t c;

  always @(posedge clk) cyc++;

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ctrl = nop(); cyc = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    sum = 0;
    for (int i = 0; i < N; i++) begin
      x[i] = word_t'($urandom_range(65535, 0)); h[i] = word_t'($urandom_range(65535, 0));
      poke(16'h0100 + i, x[i]);
      poke(16'h0200 + i, h[i]);
      sum += longint'(signed'(x[i])) * longint'(signed'(h[i]));
    end
    load_ar(1, 16'h0100);
    load_ar(2, 16'h0200);
    // A = 0
    c = nop(); c.cpu.alu_op = ALU_PASSB; c.cpu.alu_b = SRC_ZERO; c.cpu.acc_we = 1; step(c);
    // MAC *AR1+, *AR2+, A   (N cycles)
    t0 = cyc;
    c = nop();
    c.dag_d.mode = AM_INDIRECT; c.dag_d.arn = 1; c.dag_d.armod = MOD_INC;
    c.dag_c.mode = AM_INDIRECT; c.dag_c.arn = 2; c.dag_c.armod = MOD_INC;
    c.cpu.mul_x = MX_DB; c.cpu.mul_y = MY_CB; c.cpu.mau_c = MC_ACCA; c.cpu.acc_res = RES_MAU;
    c.cpu.acc_we = 1;
    for (int i = 0; i < N; i++) step(c);
    checks++;
    if (cyc - t0 != N) begin failures++; $display("FAIL cycles %0d, expected %0d", cyc - t0, N); end
    checks++;
    if (acca !== 40'(sum)) begin failures++; $display("FAIL FIR %h expected %h", acca, 40'(sum)); end

    // STH A, 0x0300 (high word)
    c = nop(); c.cpu.sh_src = SRC_ACCA; c.cpu.sh_amt = 0; c.cpu.sh_msw = 1;
    c.dag_d.mode = AM_ABS; c.dag_d.offs = 16'h0300; c.mem_we = 1; step(c);
    // LD 0x0300 -> B (sign-extended)
    c = nop(); c.dag_d.mode = AM_ABS; c.dag_d.offs = 16'h0300;
    c.cpu.alu_op = ALU_PASSB; c.cpu.alu_b = SRC_DB; c.cpu.acc_we = 1; c.cpu.acc_dst = 1; step(c);
    checks++;
    if (accb !== acc_t'(signed'(acca[31:16]))) begin failures++; $display("FAIL STH/LD %h", accb); end

    // bit-reversed copy: words 0..7 at 0x0400 copied to 0x0500 in bit-reversed order
    for (int i = 0; i < 8; i++) poke(16'h0400 + i, word_t'(16'hA0 + i));
    load_ar(0, 4); load_ar(3, 16'h0400); load_ar(4, 16'h0500);
    for (int i = 0; i < 8; i++) begin
      // read *AR3+0B on CB into B, then write it to *AR4+
      c = nop(); c.dag_c.mode = AM_INDIRECT; c.dag_c.arn = 3; c.dag_c.armod = MOD_INC0B;
      c.cpu.alu_op = ALU_PASSB; c.cpu.alu_b = SRC_CB; c.cpu.acc_we = 1; c.cpu.acc_dst = 1; step(c);
      c = nop(); c.cpu.sh_src = SRC_ACCB; c.dag_d.mode = AM_INDIRECT; c.dag_d.arn = 4;
      c.dag_d.armod = MOD_INC; c.mem_we = 1; step(c);
    end
    for (int i = 0; i < 8; i++) begin
      int br;
      br = {i[0], i[1], i[2]};
      checks++;
      if (dut.u_ram.mem[16'h0500 + i] !== word_t'(16'hA0 + br)) begin
        failures++; $display("FAIL bitrev copy %0d: %h", i, dut.u_ram.mem[16'h0500 + i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
