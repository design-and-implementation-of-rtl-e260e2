// tb_mips_fp_pipeline: runs a small program on the pipeline with program
// and data memory models. It loads single and double operands (lwc1),
// executes add/sub/mul/div.s and add/sub/mul.d, stores every result
// (swc1) and checks it against the simulator's arithmetic; then runs a
// counted loop closed by c.lt.s / bc1t (taken four times, squashing the
// three younger instructions each time) and a bc1f / bc1t pair, checking
// which stores happened. It also counts instruction-cache misses: the
// loop body misses only on its first pass.
module tb_mips_fp_pipeline;
  import mips_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] pmem_addr, dmem_addr;
  logic [31:0] pmem_data, dmem_wdata, dmem_rdata, pc, gpr_wd;
  logic dmem_we, gpr_we, fcc, icache_miss, flush, retire;
  logic [4:0] gpr_wa;
  logic [31:0] prog [256];
  logic [31:0] dmem [1024];
  localparam int OUT = 64;   // word address of the result area (byte 0x100)
  int checks = 0, failures = 0, misses = 0, flushes = 0, loop_misses = 0;

  mips_fp_pipeline dut (.clk, .rst_n, .pmem_addr, .pmem_data, .dmem_addr, .dmem_we, .dmem_wdata,
                        .dmem_rdata, .gpr_we, .gpr_wa, .gpr_wd, .pc, .fcc, .icache_miss, .flush, .retire);

  always #5 clk = ~clk;
  assign pmem_data  = prog[pmem_addr[7:0]];
  assign dmem_rdata = dmem[dmem_addr[9:0]];
  int loop_stores = 0;
  always @(posedge clk) if (dmem_we) begin
    dmem[dmem_addr[9:0]] <= dmem_wdata;
    if (dmem_addr == 16'(OUT + 10)) loop_stores++;
  end
  always @(posedge clk) if (rst_n) begin
    if (icache_miss) misses++;
    if (icache_miss && pc >= 32'd116 && pc < 32'd136 && flushes > 0) loop_misses++;
    if (flush) flushes++;
  end

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

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  logic [31:0] A, B;
  logic [63:0] D1, D2, r;

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    A = rnd_s(10); B = rnd_s(10); D1 = rnd_d(100); D2 = rnd_d(100);
    for (int i = 0; i < 1024; i++) dmem[i] = 0;
    for (int i = 0; i < 256; i++) prog[i] = 32'd0;
    dmem[0] = A; dmem[1] = B; dmem[2] = D1[31:0]; dmem[3] = D1[63:32];
    dmem[4] = D2[31:0]; dmem[5] = D2[63:32]; dmem[6] = 32'h3F800000; dmem[7] = 32'h40A00000;
    n = 0;
    prog[n++] = lwc1(1, 0, 0);
    prog[n++] = lwc1(2, 0, 4);
    prog[n++] = lwc1(4, 0, 8);
    prog[n++] = lwc1(5, 0, 12);
    prog[n++] = lwc1(6, 0, 16);
    prog[n++] = lwc1(7, 0, 20);
    prog[n++] = 0; prog[n++] = 0;
    prog[n++] = fop(FMT_S, 0, 8, 1, 2);      // 8  add.s f8  = f1 + f2
    prog[n++] = fop(FMT_S, 1, 9, 1, 2);      // 9  sub.s f9  = f1 - f2
    prog[n++] = fop(FMT_S, 2, 10, 1, 2);     // 10 mul.s
    prog[n++] = fop(FMT_S, 3, 11, 1, 2);     // 11 div.s
    prog[n++] = fop(FMT_D, 0, 12, 4, 6);     // 12 add.d f12 = f4 + f6
    prog[n++] = fop(FMT_D, 1, 14, 4, 6);     // 13 sub.d
    prog[n++] = fop(FMT_D, 2, 16, 4, 6);     // 14 mul.d
    for (int i = 0; i < 10; i++) prog[n++] = swc1(8 + i, 2, 4 * i);   // 15..24
    prog[n++] = lwc1(21, 0, 24);             // 25 f21 = 1.0
    prog[n++] = lwc1(22, 0, 28);             // 26 f22 = 5.0
    prog[n++] = 0; prog[n++] = 0;            // 27, 28
    prog[n++] = fop(FMT_S, 0, 20, 20, 21);   // 29 L: f20 += 1.0   (byte 116)
    prog[n++] = 0; prog[n++] = 0;            // 30, 31
    prog[n++] = fop(FMT_S, 6'h32, 0, 20, 22);// 32 c.lt.s f20, f22
    prog[n++] = bc1(1, 29 - 34);             // 33 bc1t L
    prog[n++] = swc1(20, 2, 40);             // 34 store loop counter
    prog[n++] = fop(FMT_S, 6'h30, 0, 20, 22);// 35 c.eq.s f20, f22 (true)
    prog[n++] = bc1(0, 40 - 37);             // 36 bc1f -> not taken
    prog[n++] = bc1(1, 39 - 38);             // 37 bc1t -> taken, skips 38
    prog[n++] = swc1(21, 2, 44);             // 38 must be squashed
    prog[n++] = swc1(22, 2, 48);             // 39
    gpr_we = 0; gpr_wa = 0; gpr_wd = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    gpr_we = 1; gpr_wa = 2; gpr_wd = 32'h100; @(posedge clk); #1; gpr_we = 0;
    repeat (150) @(posedge clk); #1;

    chk("add.s", dmem[OUT + 0], rs(sr(A) + sr(B)));
    chk("sub.s", dmem[OUT + 1], rs(sr(A) - sr(B)));
    chk("mul.s", dmem[OUT + 2], rs(sr(A) * sr(B)));
    chk("div.s", dmem[OUT + 3], rs(sr(A) / sr(B)));
    r = $realtobits($bitstoreal(D1) + $bitstoreal(D2));
    chk("add.d lo", dmem[OUT + 4], r[31:0]);  chk("add.d hi", dmem[OUT + 5], r[63:32]);
    r = $realtobits($bitstoreal(D1) - $bitstoreal(D2));
    chk("sub.d lo", dmem[OUT + 6], r[31:0]);  chk("sub.d hi", dmem[OUT + 7], r[63:32]);
    r = $realtobits($bitstoreal(D1) * $bitstoreal(D2));
    chk("mul.d lo", dmem[OUT + 8], r[31:0]);  chk("mul.d hi", dmem[OUT + 9], r[63:32]);
    chk("loop count", dmem[OUT + 10], 32'h40A00000);
    chk("squashed store", dmem[OUT + 11], 32'h0);
    chk("store after bc1t", dmem[OUT + 12], 32'h40A00000);
    checks++; if (loop_stores != 1) begin failures++; $display("FAIL %0d stores after the loop branch", loop_stores); end
    checks++; if (flushes != 5) begin failures++; $display("FAIL flushes %0d", flushes); end
    checks++; if (loop_misses != 0) begin failures++; $display("FAIL loop refetched %0d", loop_misses); end
    checks++; if (misses < 40) begin failures++; $display("FAIL misses %0d", misses); end
    checks++; if (fcc !== 1'b1) failures++;
    $display("icache misses %0d, branch flushes %0d", misses, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
