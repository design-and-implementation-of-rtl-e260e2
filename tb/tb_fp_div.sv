// tb_fp_div: single-precision division against the simulator's double
// arithmetic rounded to single; also x/0, 0/x and exact quotients.
module tb_fp_div;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_div dut (.a, .b, .y);

  task automatic chk(logic [31:0] ia, logic [31:0] ib);
    logic [31:0] e;
    a = ia; b = ib; #1;
    e = rs(sr(ia) / sr(ib));
    checks++;
    if (y !== e) begin failures++; if (failures < 10) $display("FAIL %h / %h = %h exp %h", ia, ib, y, e); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(32'h40400000, 32'h40000000);          // 3 / 2
    chk(32'h3F800000, 32'h40400000);          // 1 / 3
    chk(32'h00000000, 32'h40400000);          // 0 / 3
    a = 32'h3F800000; b = 32'h00000000; #1;   // 1 / 0 = inf
    checks++; if (y !== 32'h7F800000) failures++;
    for (int i = 0; i < 6000; i++) chk(rnd_s(60), rnd_s(60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
