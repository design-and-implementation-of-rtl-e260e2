// fp_regfile: the 32 x 32-bit floating-point register file $f0..$f31 of the
// MIPS pipeline. A double occupies an even/odd pair: the even register
// holds the low word, the odd register the high word. Two read ports each
// return the 64-bit pair {f[n|1], f[n&~1]} and the single register f[n]; the
// write port writes one register, or a pair when `wdbl` is set.
// Writes take effect on the rising edge and are forwarded to the read ports
// in the same cycle (write in the first half, read in the second, as the
// classic 5-stage pipeline assumes), so an instruction reads a value
// written back in its own decode cycle. Reset clears all registers.
// The pairing rule is the MIPS convention; the document lists the double
// instructions but not the register layout.
module fp_regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rs1,
  output logic [31:0] rs2,
  output logic [63:0] rd1,
  output logic [63:0] rd2,
  input  logic        we,
  input  logic        wdbl,
  input  logic [4:0]  wa,
  input  logic [63:0] wd
);
  logic [31:0] f [32];
  logic [31:0] v [32];   // register values with this cycle's write applied

  always_comb begin
    for (int i = 0; i < 32; i++) v[i] = f[i];
    if (we) begin
      if (wdbl) begin
        v[{wa[4:1], 1'b0}] = wd[31:0];
        v[{wa[4:1], 1'b1}] = wd[63:32];
      end else begin
        v[wa] = wd[31:0];
      end
    end
  end

  assign rs1 = v[ra1];
  assign rs2 = v[ra2];
  assign rd1 = {v[{ra1[4:1], 1'b1}], v[{ra1[4:1], 1'b0}]};
  assign rd2 = {v[{ra2[4:1], 1'b1}], v[{ra2[4:1], 1'b0}]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 32; i++) f[i] <= '0;
    else        for (int i = 0; i < 32; i++) f[i] <= v[i];
  end
endmodule
