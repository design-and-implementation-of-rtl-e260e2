// icache: instruction cache between the program sequencer and program
// memory. It holds LINES one-word lines, direct mapped by the word address
// (index = word address mod LINES, tag = the rest), each with a valid bit
// cleared at reset. A hit returns the instruction in the same cycle. On a
// miss the word is read from program memory over the program bus in that
// cycle and written into the line at the clock edge; `hit` stays low for
// that cycle, so the fetch stage stalls one cycle and the next try hits.
// This is the effect the document describes: the first pass through a
// loop uses the program bus, later passes come from the cache. The size
// (32 instructions) is the document's; direct mapping, one-word lines and
// the one-cycle refill are this design's choices.
module icache #(
  parameter int unsigned LINES = 32,
  parameter int unsigned AW    = 30     // word address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,            // fetch request this cycle
  input  logic [AW-1:0] addr,           // word address
  output logic [31:0]   instr,
  output logic          hit,
  output logic [AW-1:0] mem_addr,       // program memory address bus
  output logic          mem_rd,
  input  logic [31:0]   mem_data,       // program memory data bus
  output logic          miss            // a refill happens this cycle
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = AW - IW;

  logic [31:0]   data [LINES];
  logic [TW-1:0] tag  [LINES];
  logic [LINES-1:0] valid;

  logic [IW-1:0] idx;
  logic [TW-1:0] atag;

  assign idx      = addr[IW-1:0];
  assign atag     = addr[AW-1:IW];
  assign hit      = req && valid[idx] && tag[idx] == atag;
  assign instr    = data[idx];
  assign miss     = req && !hit;
  assign mem_rd   = miss;
  assign mem_addr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (miss) valid[idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (miss) begin
      data[idx] <= mem_data;
      tag[idx]  <= atag;
    end
  end
endmodule
