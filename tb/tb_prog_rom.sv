// tb_prog_rom: fills the 2k-word program memory through its load port and
// reads every word back; addresses beyond the depth read zero.
module tb_prog_rom;
  localparam int DEPTH = 2048;
  logic clk = 0;
  logic [15:0] addr, load_addr;
  logic [31:0] data, load_data;
  logic load_we;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  prog_rom dut (.clk, .addr, .data, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      load_we = 1; load_addr = 16'(i); load_data = model[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      addr = 16'(i); #1;
      checks++;
      if (data !== model[i]) begin failures++; if (failures < 5) $display("FAIL at %0d", i); end
    end
    addr = 16'(DEPTH); #1;
    checks++; if (data !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
