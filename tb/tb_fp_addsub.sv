// tb_fp_addsub: single and double add/subtract against the simulator's
// double arithmetic (rounded to single for the single unit): random normal
// operands over a wide exponent range, close operands (cancellation),
// exact cancellation, zeros and infinities.
module tb_fp_addsub;
  import fp_ref_pkg::*;
  logic [31:0] sa, sb, sy;
  logic [63:0] da, db, dy;
  logic sub;
  int checks = 0, failures = 0;

  fp_addsub #(.EW(8),  .FW(23)) u_s (.a(sa), .b(sb), .sub, .y(sy));
  fp_addsub #(.EW(11), .FW(52)) u_d (.a(da), .b(db), .sub, .y(dy));

  task automatic chk_s(logic [31:0] a, logic [31:0] b, logic s);
    logic [31:0] e;
    sa = a; sb = b; sub = s; #1;
    e = rs(s ? sr(a) - sr(b) : sr(a) + sr(b));
    if (e[30:0] == 0) e = 32'd0;                 // exact zero result is +0
    checks++;
    if (sy !== e) begin failures++; if (failures < 10) $display("FAIL s %h %s %h = %h exp %h", a, s ? "-" : "+", b, sy, e); end
  endtask

  task automatic chk_d(logic [63:0] a, logic [63:0] b, logic s);
    logic [63:0] e;
    da = a; db = b; sub = s; #1;
    e = $realtobits(s ? $bitstoreal(a) - $bitstoreal(b) : $bitstoreal(a) + $bitstoreal(b));
    if (e[62:0] == 0) e = 64'd0;
    checks++;
    if (dy !== e) begin failures++; if (failures < 10) $display("FAIL d %h %s %h = %h exp %h", a, s ? "-" : "+", b, dy, e); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk_s(32'h3FC00000, 32'h40200000, 0);      // 1.5 + 2.5 = 4
    chk_s(32'h3F800000, 32'h3F800000, 1);      // 1 - 1 = +0
    chk_s(32'h00000000, 32'h3F800000, 0);
    chk_s(32'h7F800000, 32'h3F800000, 0);      // inf + 1
    chk_s(32'h7F7FFFFF, 32'h7F7FFFFF, 0);      // overflow
    chk_d(64'h3FF8000000000000, 64'h4004000000000000, 0);
    for (int i = 0; i < 4000; i++) chk_s(rnd_s(30), rnd_s(30), 1'($urandom));
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] a; a = rnd_s(20);
      chk_s(a, {a[31:8], 8'($urandom)}, 1'($urandom));   // near-cancellation
    end
    for (int i = 0; i < 4000; i++) chk_d(rnd_d(60), rnd_d(60), 1'($urandom));
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] a; a = rnd_d(20);
      chk_d(a, {a[63:12], 12'($urandom)}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
