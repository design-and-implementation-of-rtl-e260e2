// prog_rom: internal program ROM, 2k words x 32 bits by default, read
// asynchronously by word address. The document gives the size only. So that
// a program can be placed in it without a mask step, it has a load port
// that writes one word per clock (used at boot, before the processor runs);
// addresses at or above DEPTH read as zero. The load port is this design's
// choice. The array is not reset.
module prog_rom #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 16
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] data,
  input  logic             load_we,
  input  logic [AW-1:0]    load_addr,
  input  logic [WIDTH-1:0] load_data
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  assign data = (32'(addr) < DEPTH) ? mem[addr[IW-1:0]] : '0;

  always_ff @(posedge clk) begin
    if (load_we && 32'(load_addr) < DEPTH) mem[load_addr[IW-1:0]] <= load_data;
  end
endmodule
