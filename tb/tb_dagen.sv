// tb_dagen: address generation in every mode: indirect with each
// post-modification (including the bit-reversed order 0,4,2,6,1,5,3,7 of
// an 8-point FFT with AR0 = 4), two ARAUs in the same cycle, direct
// (DP page + offset), memory-mapped (page 0), absolute, stack push/pop,
// and circular buffers of BK = 5 walked by +1, -1 and +AR0.
module tb_dagen;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  dag_ctrl_t ctl_d, ctl_c;
  logic ar_we, dp_we, sp_we, bk_we;
  logic [2:0] ar_sel;
  word_t ar_din, reg_din;
  addr_t dab, cab, sp, bk;
  addr_t ar [NAR];
  logic [8:0] dp;
  logic d_valid, c_valid;
  int checks = 0, failures = 0;

  dagen dut (.clk, .rst_n, .ctl_d, .ctl_c, .ar_we, .ar_sel, .ar_din, .dp_we, .sp_we, .bk_we, .reg_din,
             .dab, .cab, .d_valid, .c_valid, .ar, .dp, .sp, .bk);

  always #5 clk = ~clk;

  function automatic dag_ctrl_t mk(amode_e m, int arn = 0, armod_e md = MOD_NONE, int offs = 0);
    dag_ctrl_t c;
    c.mode = m; c.arn = 3'(arn); c.armod = md; c.offs = addr_t'(offs);
    return c;
  endfunction

  task automatic idle();
    ctl_d = mk(AM_NONE); ctl_c = mk(AM_NONE); ar_we = 0; dp_we = 0; sp_we = 0; bk_we = 0;
  endtask

  task automatic load_ar(int n, int v);
    idle(); ar_we = 1; ar_sel = 3'(n); ar_din = word_t'(v);
    @(posedge clk); #1; idle();
  endtask

  task automatic chk(string what, addr_t got, addr_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  int brev [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle(); ar_sel = 0; ar_din = 0; reg_din = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;

    // bit-reversed walk over an 8-point buffer at 0x0100
    load_ar(0, 4);
    load_ar(3, 16'h0100);
    for (int i = 0; i < 8; i++) begin
      ctl_d = mk(AM_INDIRECT, 3, MOD_INC0B); #1;
      chk("bit-reversed", dab, addr_t'(16'h0100 + brev[i]));
      checks++; if (!d_valid) failures++;
      @(posedge clk); #1;
    end
    idle();

    // two ARAUs at once: AR1 post-increment, AR2 post-decrement
    load_ar(1, 16'h0200);
    load_ar(2, 16'h0300);
    for (int i = 0; i < 5; i++) begin
      ctl_d = mk(AM_INDIRECT, 1, MOD_INC); ctl_c = mk(AM_INDIRECT, 2, MOD_DEC); #1;
      chk("AR1+", dab, addr_t'(16'h0200 + i));
      chk("AR2-", cab, addr_t'(16'h0300 - i));
      @(posedge clk); #1;
    end
    // +AR0 / -AR0 / no modification
    ctl_d = mk(AM_INDIRECT, 1, MOD_INC0); @(posedge clk); #1;
    chk("AR1+0", ar[1], 16'h0209);
    ctl_d = mk(AM_INDIRECT, 1, MOD_DEC0); @(posedge clk); #1;
    chk("AR1-0", ar[1], 16'h0205);
    ctl_d = mk(AM_INDIRECT, 1, MOD_NONE); @(posedge clk); #1;
    chk("AR1", ar[1], 16'h0205);
    ctl_d = mk(AM_INDIRECT, 3, MOD_DEC0B); #1;   // AR3 back at 0x0100 after the walk
    chk("AR3 wrap", dab, 16'h0100);
    @(posedge clk); #1;
    chk("AR3-0B", ar[3], 16'h0107);
    idle();

    // direct: DP = 0x005, offset 0x12 -> 0x0292
    dp_we = 1; reg_din = 16'h0005; @(posedge clk); #1; idle();
    ctl_d = mk(AM_DIRECT, 0, MOD_NONE, 16'hFF92); #1;
    chk("direct", dab, 16'h0292);
    ctl_c = mk(AM_MMR, 0, MOD_NONE, 16'h1234); #1;
    chk("mmr", cab, 16'h0034);
    ctl_c = mk(AM_ABS, 0, MOD_NONE, 16'hBEEF); #1;
    chk("absolute", cab, 16'hBEEF);
    idle();

    // stack: SP = 0x1000; push twice, pop twice
    sp_we = 1; reg_din = 16'h1000; @(posedge clk); #1; idle();
    ctl_d = mk(AM_PUSH); #1; chk("push1", dab, 16'h0FFF); @(posedge clk); #1;
    ctl_d = mk(AM_PUSH); #1; chk("push2", dab, 16'h0FFE); @(posedge clk); #1;
    ctl_d = mk(AM_POP);  #1; chk("pop1",  dab, 16'h0FFE); @(posedge clk); #1;
    ctl_d = mk(AM_POP);  #1; chk("pop2",  dab, 16'h0FFF); @(posedge clk); #1;
    chk("sp", sp, 16'h1000);
    idle(); #1;
    checks++; if (d_valid || c_valid) failures++;

    // circular buffer of 5 words at 0x0400 (8-aligned): +1 on port D and
    // -1 on port C in the same cycle, then +AR0 with AR0 = 3
    bk_we = 1; reg_din = 16'd5; @(posedge clk); #1; idle();
    chk("bk", bk, 16'd5);
    load_ar(4, 16'h0402);
    load_ar(5, 16'h0401);
    for (int i = 0; i < 12; i++) begin
      ctl_d = mk(AM_INDIRECT, 4, MOD_INCC); ctl_c = mk(AM_INDIRECT, 5, MOD_DECC); #1;
      chk("circ+1", dab, addr_t'(16'h0400 + (2 + i) % 5));
      chk("circ-1", cab, addr_t'(16'h0400 + (1 + 5 * 12 - i) % 5));
      @(posedge clk); #1;
    end
    idle();
    load_ar(0, 3);
    load_ar(4, 16'h0400);
    for (int i = 0; i < 10; i++) begin
      ctl_d = mk(AM_INDIRECT, 4, MOD_INC0C); #1;
      chk("circ+AR0", dab, addr_t'(16'h0400 + (3 * i) % 5));
      @(posedge clk); #1;
    end
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
