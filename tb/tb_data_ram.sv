// tb_data_ram: writes random words over the whole depth, then reads them
// back on both read ports at once; checks read-before-write in the write
// cycle and that addresses beyond the depth read zero and are not written.
module tb_data_ram;
  localparam int DEPTH = 10240;
  logic clk = 0;
  logic [15:0] ra0, ra1, wa;
  logic [31:0] rd0, rd1, wd;
  logic we;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_ram dut (.clk, .ra0, .rd0, .ra1, .rd1, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; ra0 = 0; ra1 = 0; wa = 0; wd = 0;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      we = 1; wa = 16'(i); wd = model[i];
      @(posedge clk); #1;
    end
    // write beyond the depth: ignored
    wa = 16'(DEPTH); wd = 32'hDEAD_BEEF; @(posedge clk); #1;
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      ra0 = 16'(i); ra1 = 16'(DEPTH - 1 - i); #1;
      checks++;
      if (rd0 !== model[i] || rd1 !== model[DEPTH-1-i]) begin
        failures++;
        if (failures < 5) $display("FAIL at %0d", i);
      end
    end
    ra0 = 16'(DEPTH); ra1 = 16'hFFFF; #1;
    checks++; if (rd0 !== 0 || rd1 !== 0) failures++;
    // read during write returns the old word
    ra0 = 16'd7; we = 1; wa = 16'd7; wd = ~model[7]; #1;
    checks++; if (rd0 !== model[7]) failures++;
    @(posedge clk); #1; we = 0;
    checks++; if (rd0 !== ~model[7]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
