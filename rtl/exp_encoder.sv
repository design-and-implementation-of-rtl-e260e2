// exp_encoder: exponent encoder of the DSP CPU. It finds how far a 40-bit
// accumulator value must be shifted left so that its most significant
// non-sign bit lands in bit 30 (a normalised 32-bit fraction): the count of
// redundant sign bits minus the 8 guard bits. The result lies in -8 .. 31
// and is written to the T register, from where it can drive the barrel
// shifter (block floating point). A zero input gives 0.
// The document names the block and its use for floating-point data; the
// exact definition of the count is this design's choice (it matches the
// common fixed-point DSP EXP instruction). Combinational.
module exp_encoder #(
  parameter int unsigned W     = 40,
  parameter int unsigned GUARD = 8
) (
  input  logic [W-1:0]       acc,
  output logic signed [5:0]  expo
);
  always_comb begin
    int cnt;
    cnt = 0;
    // count bits below the sign bit equal to it
    for (int i = W-2; i >= 0; i--) begin
      if (acc[i] == acc[W-1] && cnt == (W-2-i)) cnt++;
    end
    if (acc == '0) expo = '0;
    else           expo = 6'(cnt - int'(GUARD));
  end
endmodule
