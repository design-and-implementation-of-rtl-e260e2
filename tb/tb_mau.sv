// tb_mau: checks Y = +-(a*b (fract)) + c with rounding and saturation
// against a reference computed with 64-bit integers.
module tb_mau;
  logic signed [16:0] a, b;
  logic [39:0] c, y;
  logic neg, frct, rnd, ovm, zero, sat;
  int checks = 0, failures = 0;

  mau dut (.a, .b, .c, .neg, .frct, .rnd, .ovm, .y, .zero, .sat);

  function automatic longint sx40(logic [39:0] v);
    return longint'(signed'(v));
  endfunction

  task automatic chk(logic signed [16:0] ia, logic signed [16:0] ib, logic [39:0] ic,
                     logic ineg, logic ifr, logic ird, logic iov);
    longint pr, s, e;
    logic esat;
    a = ia; b = ib; c = ic; neg = ineg; frct = ifr; rnd = ird; ovm = iov; #1;
    pr = longint'(ia) * longint'(ib);
    if (ifr) pr = pr * 2;
    s = ineg ? sx40(ic) - pr : sx40(ic) + pr;
    s = sx40(40'(s));                          // wrap to 40 bits
    if (ird) s = sx40(40'((s + 32768) & ~longint'(65535)));
    esat = 0;
    e = s;
    if (iov && s > 64'sh7FFF_FFFF)     begin e = 64'sh7FFF_FFFF; esat = 1; end
    if (iov && s < -64'sh8000_0000)    begin e = -64'sh8000_0000; esat = 1; end
    checks++;
    if (sx40(y) != e || sat != esat || zero != (e == 0)) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%h neg=%b fr=%b rnd=%b ovm=%b: y=%h sat=%b, expected %h sat=%b",
               ia, ib, ic, ineg, ifr, ird, iov, y, sat, 40'(e), esat);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fractional Q15: 0.5 * 0.5 = 0.25 (0x4000 * 0x4000 << 1 = 0x2000_0000)
    chk(17'sh4000, 17'sh4000, 0, 0, 1, 0, 0);
    // -1 * -1 in Q15 saturates with ovm
    chk(-17'sh8000, -17'sh8000, 0, 0, 1, 0, 1);
    chk(-17'sh8000, -17'sh8000, 0, 0, 1, 0, 0);
    // rounding and MAS
    chk(3, 5, 40'h00_0000_7FFF, 0, 0, 1, 0);
    chk(3, 5, 40'h00_0001_0000, 1, 0, 0, 0);
    chk(0, 5, 0, 0, 0, 0, 0);
    for (int i = 0; i < 3000; i++)
      chk(17'(signed'(16'($urandom))), 17'(signed'(16'($urandom))),
          40'(signed'(34'({$urandom, 2'($urandom)}))),
          1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
