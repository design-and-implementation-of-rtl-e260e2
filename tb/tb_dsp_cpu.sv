// tb_dsp_cpu: drives the CPU datapath with decoded control words:
// loads, the shifted-immediate add ADD #4568,8,A,B (A = 0x1200 gives
// B = 0x457A00), T loads, fractional MPY/MAC/MAS with rounding, MIN/MAX,
// EXP into T and a T-controlled normalising shift, a shifted store on EB,
// ALU saturation, a run of parallel LD||MAC steps (both accumulators
// written in one cycle), and a run of random MACs against a software
// accumulator.
module tb_dsp_cpu;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  cpu_ctrl_t ctrl;
  word_t pb, cb, db, eb, treg;
  acc_t acca, accb;
  logic ovf, sat, zero, pick_b;
  int checks = 0, failures = 0;

  dsp_cpu dut (.clk, .rst_n, .ctrl, .pb, .cb, .db, .eb, .acca, .accb, .treg, .ovf, .sat, .zero, .pick_b);

  always #5 clk = ~clk;

  function automatic cpu_ctrl_t nop();
    cpu_ctrl_t c;
    c = '0;
    c.sxm = 1'b1;
    c.alu_a = SRC_ACCA; c.alu_b = SRC_PB; c.sh_src = SRC_PB;
    c.mul_x = MX_T; c.mul_y = MY_CB; c.mau_c = MC_ZERO; c.alu_op = ALU_ADD; c.acc_res = RES_ALU;
    return c;
  endfunction

  task automatic step(cpu_ctrl_t c, word_t ipb = 0, word_t icb = 0, word_t idb = 0);
    ctrl = c; pb = ipb; cb = icb; db = idb;
    @(posedge clk); #1;
  endtask

  task automatic expect40(string what, acc_t got, acc_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  cpu_ctrl_t c;
  longint model;

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ctrl = nop(); pb = 0; cb = 0; db = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;

    // LD #1200h, A
    c = nop(); c.alu_op = ALU_PASSB; c.alu_b = SRC_PB; c.acc_we = 1; c.acc_dst = 0;
    step(c, 16'h1200);
    expect40("LD #1200,A", acca, 40'h00_0000_1200);

    // ADD #4568h, 8, A, B
    c = nop(); c.sh_src = SRC_PB; c.sh_amt = 8; c.alu_a = SRC_ACCA; c.alu_b = SRC_SHIFT;
    c.acc_we = 1; c.acc_dst = 1;
    step(c, 16'h4568);
    expect40("ADD #4568,8,A,B", accb, 40'h00_0045_7A00);

    // LD T from DB; MPY T * CB (fractional) -> A
    c = nop(); c.t_load = 1; step(c, 0, 0, 16'h4000);
    expect40("T", 40'(treg), 40'h4000);
    c = nop(); c.frct = 1; c.mul_x = MX_T; c.mul_y = MY_CB; c.mau_c = MC_ZERO;
    c.acc_res = RES_MAU; c.acc_we = 1; c.acc_dst = 0;
    step(c, 0, 16'h2000);
    expect40("MPY", acca, 40'h00_1000_0000);

    // MAC DB * CB + A -> A (negative operand)
    c = nop(); c.frct = 1; c.mul_x = MX_DB; c.mul_y = MY_CB; c.mau_c = MC_ACCA;
    c.acc_res = RES_MAU; c.acc_we = 1;
    step(c, 0, 16'hC000, 16'h4000);    // 0.5 * -0.5 = -0.25
    expect40("MAC", acca, 40'h00_1000_0000 - 40'h00_2000_0000);

    // MAS with rounding into B: B = round(B - 3*5)
    c = nop(); c.mul_x = MX_DB; c.mul_y = MY_PB; c.mau_c = MC_ACCB; c.mau_neg = 1; c.mau_rnd = 1;
    c.acc_res = RES_MAU; c.acc_we = 1; c.acc_dst = 1;
    step(c, 16'd5, 0, 16'd3);
    expect40("MASR", accb, (40'h00_0045_7A00 - 15 + 40'h8000) & ~40'hFFFF);

    // MAX A,B -> A ; then MIN -> B
    c = nop(); c.cssu_max = 1; c.acc_res = RES_CSSU; c.acc_we = 1; c.acc_dst = 0;
    step(c);
    expect40("MAX", acca, 40'h00_0045_0000);
    c = nop(); c.alu_op = ALU_PASSB; c.alu_b = SRC_PB; c.acc_we = 1; c.acc_dst = 1;
    step(c, 16'h8000);                    // B = -32768
    c = nop(); c.cssu_max = 0; c.acc_res = RES_CSSU; c.acc_we = 1; c.acc_dst = 0;
    step(c);
    expect40("MIN", acca, 40'hFF_FFFF_8000);

    // EXP B -> T, then normalise B by T: shift left by (T)
    c = nop(); c.alu_op = ALU_PASSB; c.alu_b = SRC_PB; c.acc_we = 1; c.acc_dst = 1;
    step(c, 16'h0123);
    c = nop(); c.t_exp = 1; c.exp_b = 1; step(c);
    expect40("EXP", 40'(treg), 40'h0016);          // 0x123: 22 redundant sign bits beyond the guard
    c = nop(); c.sh_src = SRC_ACCB; c.sh_amt = -6'sd32; c.acc_res = RES_SHIFT; c.acc_we = 1; c.acc_dst = 1;
    step(c);
    expect40("NORM", accb, 40'h00_48C0_0000);

    // store high word of B shifted right by 4 on EB (combinational)
    c = nop(); c.sh_src = SRC_ACCB; c.sh_amt = -4; c.sh_arith = 1; c.sh_msw = 1;
    ctrl = c; #1;
    expect40("STH", 40'(eb), 40'h048C);

    // saturation: A = 0x7FFF_FFFF (via shift of 0x7FFF by 16 plus 0xFFFF), + 1 with ovm
    c = nop(); c.sh_src = SRC_PB; c.sh_amt = 16; c.alu_op = ALU_PASSB; c.alu_b = SRC_SHIFT; c.acc_we = 1;
    step(c, 16'h7FFF);
    c = nop(); c.sxm = 0; c.alu_a = SRC_ACCA; c.alu_b = SRC_PB; c.acc_we = 1;
    step(c, 16'hFFFF);
    expect40("LD 7FFFFFFF", acca, 40'h00_7FFF_FFFF);
    c = nop(); c.ovm = 1; c.alu_a = SRC_ACCA; c.alu_b = SRC_PB; c.acc_we = 1;
    ctrl = c; pb = 16'd1; #1;
    checks++; if (!(dut.u_alu.y == 40'h00_7FFF_FFFF)) begin failures++; $display("FAIL SAT"); end
    @(posedge clk); #1;
    expect40("SAT", acca, 40'h00_7FFF_FFFF);

    // LD||MAC: each cycle A <- DB (load) while B <- B + T * CB
    c = nop(); c.t_load = 1; step(c, 0, 0, 16'hFFFD);             // T = -3
    c = nop(); c.alu_op = ALU_PASSB; c.alu_b = SRC_ZERO; c.acc_we = 1; c.acc_dst = 1;
    step(c);
    model = 0;
    for (int i = 0; i < 40; i++) begin
      word_t x, h;
      x = 16'($urandom); h = 16'($urandom);
      c = nop(); c.alu_op = ALU_PASSB; c.alu_b = SRC_DB; c.acc_we = 1; c.acc_dst = 0;
      c.mul_x = MX_T; c.mul_y = MY_CB; c.mau_c = MC_ACCB; c.mau_par = 1;
      step(c, 0, h, x);
      model += -3 * longint'(signed'(h));
      expect40("LD||MAC load", acca, 40'(longint'(signed'(x))));
      expect40("LD||MAC mac", accb, 40'(model));
    end

    // random MAC run against a model (integer, non-fractional)
    c = nop(); c.alu_op = ALU_PASSB; c.alu_b = SRC_ZERO; c.acc_we = 1; c.acc_dst = 1;
    step(c);
    model = 0;
    for (int i = 0; i < 300; i++) begin
      word_t x, h;
      x = 16'($urandom); h = 16'($urandom);
      c = nop(); c.mul_x = MX_DB; c.mul_y = MY_CB; c.mau_c = MC_ACCB; c.acc_res = RES_MAU;
      c.acc_we = 1; c.acc_dst = 1;
      step(c, 0, h, x);
      model += longint'(signed'(x)) * longint'(signed'(h));
      expect40("MAC run", accb, 40'(model));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
