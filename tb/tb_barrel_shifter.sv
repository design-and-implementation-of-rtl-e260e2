// tb_barrel_shifter: shifts over the whole count range, both right-shift
// kinds, and clamping of counts below -16.
module tb_barrel_shifter;
  logic [39:0] din, dout;
  logic signed [5:0] amt;
  logic arith;
  int checks = 0, failures = 0;

  barrel_shifter dut (.din, .amt, .arith, .dout);

  task automatic chk(logic [39:0] d, int n, logic ar);
    logic [39:0] e; int k;
    din = d; amt = 6'(n); arith = ar; #1;
    k = n < -16 ? -16 : n;
    e = d;
    if (k >= 0) for (int i = 0; i < k; i++) e = {e[38:0], 1'b0};
    else        for (int i = 0; i < -k; i++) e = {ar ? e[39] : 1'b0, e[39:1]};
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL d=%h n=%0d ar=%b: %h expected %h", d, n, ar, dout, e);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(40'h00_0000_4568, 8, 0);
    chk(40'h80_0000_0000, -16, 1);
    chk(40'h80_0000_0000, -16, 0);
    chk(40'h80_0000_0000, -20, 1);
    for (int n = -32; n <= 31; n++) begin
      chk({8'($urandom), $urandom}, n, 1'b0);
      chk({8'($urandom), $urandom}, n, 1'b1);
    end
    for (int i = 0; i < 1000; i++) chk({8'($urandom), $urandom}, $urandom_range(47, 0) - 16, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
