// cssu: compare, select and store unit. It compares the two 40-bit
// accumulators as signed numbers and selects the larger (MAX) or smaller
// (MIN) one; `pick_b` tells which one won, and `tc` is the test/control
// flag set when the B accumulator was selected (it is the decision bit a
// compare-select-store step records). The document names the unit and the
// MIN/MAX instructions; the flag and tie rule (A wins a tie) are this
// design's choice. Combinational.
module cssu #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] acca,
  input  logic [W-1:0] accb,
  input  logic         max_n_min,  // 1 MAX, 0 MIN
  output logic [W-1:0] y,
  output logic         pick_b
);
  always_comb begin
    if (max_n_min) pick_b = signed'(accb) > signed'(acca);
    else           pick_b = signed'(accb) < signed'(acca);
    y = pick_b ? accb : acca;
  end
endmodule
