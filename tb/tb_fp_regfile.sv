// tb_fp_regfile: single and paired (double) writes, reads through both
// ports, and same-cycle write-to-read forwarding.
module tb_fp_regfile;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rs1, rs2;
  logic [63:0] rd1, rd2, wd;
  logic we, wdbl;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  fp_regfile dut (.clk, .rst_n, .ra1, .ra2, .rs1, .rs2, .rd1, .rd2, .we, .wdbl, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; wdbl = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      we = 1'($urandom); wdbl = 1'($urandom); wa = 5'($urandom); wd = {$urandom, $urandom};
      ra1 = we ? wa : 5'($urandom); ra2 = 5'($urandom); #1;
      if (we) begin
        if (wdbl) begin model[{wa[4:1], 1'b0}] = wd[31:0]; model[{wa[4:1], 1'b1}] = wd[63:32]; end
        else model[wa] = wd[31:0];
      end
      checks++;
      if (rs1 !== model[ra1] || rs2 !== model[ra2] ||
          rd1 !== {model[{ra1[4:1], 1'b1}], model[{ra1[4:1], 1'b0}]} ||
          rd2 !== {model[{ra2[4:1], 1'b1}], model[{ra2[4:1], 1'b0}]}) begin
        failures++; $display("FAIL step %0d", i);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
