// tb_icache: a loop of 20 instructions misses once per instruction on the
// first pass (one refill cycle each) and hits on every later pass; a
// conflicting address (same index, other tag) evicts a line. The returned
// words are checked against the program memory model.
module tb_icache;
  logic clk = 0, rst_n = 0;
  logic req, hit, mem_rd, miss;
  logic [29:0] addr, mem_addr;
  logic [31:0] instr, mem_data;
  int checks = 0, failures = 0, misses = 0, cycles = 0;

  icache dut (.clk, .rst_n, .req, .addr, .instr, .hit, .mem_addr, .mem_rd, .mem_data, .miss);

  always #5 clk = ~clk;
  assign mem_data = {2'b10, mem_addr} ^ 32'h1234_5678;   // program memory model

  task automatic fetch(logic [29:0] a);
    req = 1; addr = a;
    #1;
    while (!hit) begin
      misses++; cycles++;
      checks++; if (!mem_rd || mem_addr !== a) failures++;
      @(posedge clk); #1;
    end
    checks++;
    if (instr !== ({2'b10, a} ^ 32'h1234_5678)) begin failures++; $display("FAIL word at %h", a); end
    cycles++;
    @(posedge clk); #1;
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = 0; addr = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      int m0, c0;
      m0 = misses; c0 = cycles;
      for (int i = 0; i < 20; i++) fetch(30'h100 + i);
      checks++;
      if (misses - m0 != (pass == 0 ? 20 : 0)) begin failures++; $display("FAIL pass %0d misses %0d", pass, misses - m0); end
      checks++;
      if (cycles - c0 != (pass == 0 ? 40 : 20)) begin failures++; $display("FAIL pass %0d cycles %0d", pass, cycles - c0); end
    end
    // 0x100 + 32 maps onto the line of 0x100: evicts it
    fetch(30'h120);
    begin
      int m0; m0 = misses;
      fetch(30'h100);
      checks++; if (misses - m0 != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
