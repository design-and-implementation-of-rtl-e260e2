// pagen: program address generator of the MIPS pipeline: the PC register,
// its +4 adder and the next-PC multiplexer. Each cycle the PC advances to
// PC + 4 unless the fetch stage stalls (PC holds) or a taken branch
// redirects it to the branch target; the redirect wins over the stall.
// PC resets to RESET_PC. Byte addresses, word aligned, as in MIPS.
module pagen #(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,
  input  logic        redirect,
  input  logic [31:0] target,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);
  assign pc_plus4 = pc + 32'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (redirect) pc <= target;
    else if (!stall)   pc <= pc_plus4;
  end
endmodule
