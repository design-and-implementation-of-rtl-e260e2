// barrel_shifter: 40-bit shifter of the DSP CPU, shift range -16 .. 31.
// A positive count shifts left, a negative count shifts right; a control
// bit picks an arithmetic (sign-filling) or logical (zero-filling) right
// shift. Counts below -16 are clamped to -16, as the document gives the
// range -16..31; the 6-bit two's-complement count encoding is this design's
// choice. Combinational, one cycle as the document requires for a shift on
// the way to memory or an accumulator.
module barrel_shifter #(
  parameter int unsigned W       = 40,
  parameter int          MIN_SH  = -16,
  parameter int          MAX_SH  = 31
) (
  input  logic [W-1:0]       din,
  input  logic signed [5:0]  amt,
  input  logic               arith,
  output logic [W-1:0]       dout
);
  always_comb begin
    int n;
    n = int'(amt);
    if (n < MIN_SH) n = MIN_SH;
    if (n > MAX_SH) n = MAX_SH;
    if (n >= 0)      dout = din << n;
    else if (arith)  dout = W'(signed'(din) >>> (-n));
    else             dout = din >> (-n);
  end
endmodule
