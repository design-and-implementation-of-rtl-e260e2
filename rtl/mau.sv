// mau: multiply and adder unit. One cycle computes
//     Y = +-(a * b (fract)) + c
// where a and b are 17-bit signed operands (16-bit data, extended by the sign
// controls in front of the unit), the product comes from the radix-4 Booth
// multiplier, "fract" doubles the product when fractional mode is on, and c
// is 0 or an accumulator. The 40-bit result then passes the ZERO / SAT /
// ROUND stage: ROUND adds 2^15 and clears the low 16 bits; SAT clamps to the
// 32-bit range 0x00_7FFF_FFFF .. 0xFF_8000_0000 when saturation mode is on.
// The document gives the structure (multiplier, fractional shift, 0/acc mux,
// 40-bit adder, ZERO/SAT/ROUND); the saturation range and the rounding
// constant are this design's choice. Overflow out of 40 bits wraps.
//
// Combinational; the caller registers the result in an accumulator.
module mau #(
  parameter int unsigned N    = 17,
  parameter int unsigned ACCW = 40
) (
  input  logic signed [N-1:0]    a,
  input  logic signed [N-1:0]    b,
  input  logic [ACCW-1:0]        c,      // addend (0, ACCA or ACCB)
  input  logic                   neg,    // subtract the product
  input  logic                   frct,   // fractional mode (product << 1)
  input  logic                   rnd,    // round to the high word
  input  logic                   ovm,    // saturate
  output logic [ACCW-1:0]        y,
  output logic                   zero,   // y == 0
  output logic                   sat     // saturation happened
);
  localparam logic signed [ACCW-1:0] SMAX = ACCW'(64'sh7FFF_FFFF);
  localparam logic signed [ACCW-1:0] SMIN = ~SMAX;

  logic signed [2*N-1:0] prod;
  logic [ACCW-1:0]       pext, sum, rsum;
  logic signed [ACCW-1:0] ssum;

  booth_mul17 #(.N(N)) u_mul (.x(a), .y(b), .p(prod));

  always_comb begin
    pext = ACCW'(prod);                       // sign-extend the product
    if (frct) pext = pext << 1;
    sum  = neg ? c - pext : c + pext;
    rsum = rnd ? ((sum + ACCW'(32'h8000)) & ~ACCW'(32'hFFFF)) : sum;
    ssum = signed'(rsum);
    sat  = 1'b0;
    y    = rsum;
    if (ovm) begin
      if (ssum > SMAX) begin
        y = SMAX;  sat = 1'b1;
      end else if (ssum < SMIN) begin
        y = SMIN;  sat = 1'b1;
      end
    end
    zero = (y == '0);
  end
endmodule
