// tb_fp_cmp: the six compare conditions for single and double operands
// against real-number comparison, including equal values, +0/-0 and NaN.
module tb_fp_cmp;
  import fp_ref_pkg::*;
  logic [31:0] sa, sb;
  logic [63:0] da, db;
  logic [2:0] cond;
  logic sy, dy;
  int checks = 0, failures = 0;

  fp_cmp #(.EW(8),  .FW(23)) u_s (.a(sa), .b(sb), .cond, .y(sy));
  fp_cmp #(.EW(11), .FW(52)) u_d (.a(da), .b(db), .cond, .y(dy));

  function automatic logic rel(real x, real y, int c, logic nan);
    if (nan) return c == 1;
    unique case (c)
      0: return x == y;
      1: return x != y;
      2: return x <  y;
      3: return x <= y;
      4: return x >  y;
      default: return x >= y;
    endcase
  endfunction

  task automatic chk(logic [31:0] a, logic [31:0] b, logic nan = 0);
    for (int c = 0; c < 6; c++) begin
      sa = a; sb = b; da = s2d(a); db = s2d(b); cond = 3'(c); #1;
      checks++;
      if (sy !== rel(sr(a), sr(b), c, nan) || dy !== sy) begin
        failures++; $display("FAIL %h ? %h cond %0d: s=%b d=%b", a, b, c, sy, dy);
      end
    end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(32'h3F800000, 32'h3F800000);
    chk(32'h00000000, 32'h80000000);
    chk(32'hBF800000, 32'h3F800000);
    chk(32'hBF800000, 32'hC0000000);
    chk(32'h7FC00000, 32'h3F800000, 1);
    for (int i = 0; i < 1000; i++) chk(rnd_s(3), rnd_s(3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
