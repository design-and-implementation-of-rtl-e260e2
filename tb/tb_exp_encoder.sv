// tb_exp_encoder: the exponent must be the left shift that moves the first
// non-sign bit of the 40-bit value to bit 30 (checked by shifting).
module tb_exp_encoder;
  logic [39:0] acc;
  logic signed [5:0] expo;
  int checks = 0, failures = 0;

  exp_encoder dut (.acc, .expo);

  task automatic chk(logic [39:0] v);
    int e; logic [39:0] t;
    acc = v; #1;
    // count how far v can be shifted left before bit 38 differs from bit 39
    e = 0; t = v;
    if (v != 0) while (t[38] == t[39]) begin t = t << 1; e++; end
    e = (v == 0) ? 0 : e - 8;
    checks++;
    if (int'(expo) != e) begin
      failures++;
      $display("FAIL acc=%h exp=%0d expected %0d", v, expo, e);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(0); chk(1); chk(40'hFF_FFFF_FFFF); chk(40'h00_4000_0000); chk(40'h7F_0000_0000);
    chk(40'h80_0000_0000); chk(40'h00_0000_1200);
    for (int i = 0; i < 2000; i++) chk({8'($urandom), $urandom} >> $urandom_range(39, 0));
    for (int i = 0; i < 500; i++) chk(~({8'($urandom), $urandom} >> $urandom_range(39, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
