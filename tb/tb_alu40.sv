// tb_alu40: every ALU operation against a 64-bit integer reference,
// including 40-bit overflow and 32-bit saturation.
module tb_alu40;
  import dsp_pkg::*;
  alu_op_e op;
  logic [39:0] a, b, y;
  logic ovm, ovf, zero, carry;
  int checks = 0, failures = 0;

  alu40 dut (.op, .a, .b, .ovm, .y, .ovf, .zero, .carry);

  function automatic longint sx(logic [39:0] v); return longint'(signed'(v)); endfunction

  task automatic chk(alu_op_e o, logic [39:0] ia, logic [39:0] ib, logic iov);
    longint r; logic [39:0] e; logic eov;
    op = o; a = ia; b = ib; ovm = iov; #1;
    eov = 0;
    unique case (o)
      ALU_ADD:   r = sx(ia) + sx(ib);
      ALU_SUB:   r = sx(ia) - sx(ib);
      ALU_AND:   r = sx(ia & ib);
      ALU_OR:    r = sx(ia | ib);
      ALU_XOR:   r = sx(ia ^ ib);
      ALU_PASSB: r = sx(ib);
      default:   r = sx(~ia);
    endcase
    if ((o == ALU_ADD || o == ALU_SUB) && (r > 64'sh7F_FFFF_FFFF || r < -64'sh80_0000_0000)) eov = 1;
    if (iov && (o == ALU_ADD || o == ALU_SUB || o == ALU_PASSB)) begin
      if (r > 64'sh7FFF_FFFF) r = 64'sh7FFF_FFFF;
      if (r < -64'sh8000_0000) r = -64'sh8000_0000;
    end
    e = 40'(r);
    checks++;
    if (y !== e || ovf !== eov || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h ovm=%b: y=%h ovf=%b, expected %h ovf=%b", o.name(), ia, ib, iov, y, ovf, e, eov);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(ALU_ADD, 40'h00_0000_1200, 40'h00_0045_6800, 0);      // ADD #4568,8,A,B
    chk(ALU_ADD, 40'h7F_FFFF_FFFF, 1, 0);                      // 40-bit overflow
    chk(ALU_ADD, 40'h00_7FFF_FFFF, 1, 1);                      // saturates
    chk(ALU_SUB, 0, 40'h00_8000_0001, 1);
    chk(ALU_SUB, 5, 5, 0);
    for (int i = 0; i < 4000; i++) begin
      alu_op_e o;
      o = alu_op_e'($urandom_range(6, 0));
      chk(o, {8'($urandom), $urandom}, {8'($urandom), $urandom}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
