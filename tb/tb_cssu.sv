// tb_cssu: MIN and MAX of two signed 40-bit accumulators.
module tb_cssu;
  logic [39:0] acca, accb, y;
  logic max_n_min, pick_b;
  int checks = 0, failures = 0;

  cssu dut (.acca, .accb, .max_n_min, .y, .pick_b);

  task automatic chk(logic [39:0] a, logic [39:0] b, logic mx);
    longint sa, sb; logic [39:0] e;
    acca = a; accb = b; max_n_min = mx; #1;
    sa = longint'(signed'(a)); sb = longint'(signed'(b));
    e = mx ? (sb > sa ? b : a) : (sb < sa ? b : a);
    checks++;
    if (y !== e || pick_b !== (e !== a)) begin
      failures++;
      $display("FAIL a=%h b=%h max=%b y=%h", a, b, mx, y);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(40'hFF_FFFF_FFFF, 1, 1); chk(40'hFF_FFFF_FFFF, 1, 0); chk(7, 7, 1);
    for (int i = 0; i < 2000; i++) chk({8'($urandom), $urandom}, {8'($urandom), $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
