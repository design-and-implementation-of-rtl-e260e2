// tb_pagen: PC increments by 4, holds on stall, and takes the branch
// target on redirect (also during a stall).
module tb_pagen;
  logic clk = 0, rst_n = 0, stall, redirect;
  logic [31:0] target, pc, pc_plus4, model;
  int checks = 0, failures = 0;

  pagen dut (.clk, .rst_n, .stall, .redirect, .target, .pc, .pc_plus4);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    stall = 0; redirect = 0; target = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      stall = ($urandom_range(3, 0) == 0); redirect = ($urandom_range(7, 0) == 0);
      target = {$urandom, 2'b00} >> 2 << 2;
      #1;
      checks++; if (pc_plus4 !== model + 4) failures++;
      @(posedge clk); #1;
      model = redirect ? target : stall ? model : model + 4;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc %h expected %h st=%b rd=%b i=%0d", pc, model, stall, redirect, i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
