// tb_fp_mul: single and double multiplication against the simulator's
// double arithmetic, with random normal operands, zeros, infinity and
// overflow.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [31:0] sa, sb, sy;
  logic [63:0] da, db, dy;
  int checks = 0, failures = 0;

  fp_mul #(.EW(8),  .FW(23)) u_s (.a(sa), .b(sb), .y(sy));
  fp_mul #(.EW(11), .FW(52)) u_d (.a(da), .b(db), .y(dy));

  task automatic chk_s(logic [31:0] a, logic [31:0] b);
    logic [31:0] e;
    sa = a; sb = b; #1;
    e = rs(sr(a) * sr(b));
    checks++;
    if (sy !== e) begin failures++; if (failures < 10) $display("FAIL s %h * %h = %h exp %h", a, b, sy, e); end
  endtask

  task automatic chk_d(logic [63:0] a, logic [63:0] b);
    logic [63:0] e;
    da = a; db = b; #1;
    e = $realtobits($bitstoreal(a) * $bitstoreal(b));
    checks++;
    if (dy !== e) begin failures++; if (failures < 10) $display("FAIL d %h * %h = %h exp %h", a, b, dy, e); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk_s(32'h3FC00000, 32'h40200000);     // 1.5 * 2.5 = 3.75
    chk_s(32'h00000000, 32'hBF800000);     // 0 * -1 = -0
    chk_s(32'h7F800000, 32'h40000000);     // inf * 2
    chk_s(32'h7F000000, 32'h7F000000);     // overflow to inf
    for (int i = 0; i < 5000; i++) chk_s(rnd_s(60), rnd_s(60));
    for (int i = 0; i < 5000; i++) chk_d(rnd_d(500), rnd_d(500));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
