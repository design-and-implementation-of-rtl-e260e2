// data_ram: internal data RAM, 10k words x 32 bits by default, with two
// read ports and one write port so that two operands can be read in the same
// cycle (the document's reason for the internal RAM organisation). Reads are
// asynchronous (the word appears in the cycle its address is given); the
// write happens on the rising clock edge. A read of the address being
// written returns the old word. Addresses at or above DEPTH read as zero and
// are not written (they belong to external memory, not modelled here).
// The depth and width are the document's; the port timing is this design's
// choice. The array is not reset.
module data_ram #(
  parameter int unsigned DEPTH = 10240,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 16
) (
  input  logic             clk,
  input  logic [AW-1:0]    ra0,
  output logic [WIDTH-1:0] rd0,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  assign rd0 = (32'(ra0) < DEPTH) ? mem[ra0[IW-1:0]] : '0;
  assign rd1 = (32'(ra1) < DEPTH) ? mem[ra1[IW-1:0]] : '0;

  always_ff @(posedge clk) begin
    if (we && 32'(wa) < DEPTH) mem[wa[IW-1:0]] <= wd;
  end
endmodule
