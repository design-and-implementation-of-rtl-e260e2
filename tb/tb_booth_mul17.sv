// tb_booth_mul17: compares the Booth multiplier with the exact product of
// the two signed operands: corner cases, then random pairs.
module tb_booth_mul17;
  logic signed [16:0] x, y;
  logic signed [33:0] p;
  int checks = 0, failures = 0;

  booth_mul17 dut (.x, .y, .p);

  task automatic chk(logic signed [16:0] a, logic signed [16:0] b);
    longint e;
    x = a; y = b; #1;
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, e);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(0, 0); chk(1, 1); chk(-1, 1); chk(-1, -1);
    chk(17'sh10000, 17'sh10000); chk(17'sh10000, 17'sh0FFFF); chk(17'sh0FFFF, 17'sh0FFFF);
    chk(12345, -321); chk(-32768, 32767);
    for (int i = 0; i < 3000; i++) chk(17'($urandom), 17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
