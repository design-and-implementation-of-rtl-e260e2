// fp_cmp: IEEE-754 floating-point comparison for c.cond.s / c.cond.d with
// the six conditions eq, ne, lt, le, gt, ge. +0 and -0 compare equal
// (subnormals count as zero, as in the other units); any comparison with a
// NaN is false except ne. The 3-bit condition code is this design's
// (0 eq, 1 ne, 2 lt, 3 le, 4 gt, 5 ge). Combinational.
module fp_cmp #(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] a,
  input  logic [EW+FW:0] b,
  input  logic [2:0]     cond,
  output logic           y
);
  localparam logic [EW-1:0] EMAX = '1;

  always_comb begin
    logic unord, eq, lt;
    logic [EW+FW-1:0] ma, mb;
    logic az, bz;
    az = a[FW +: EW] == 0;
    bz = b[FW +: EW] == 0;
    ma = az ? '0 : a[EW+FW-1:0];
    mb = bz ? '0 : b[EW+FW-1:0];
    unord = (a[FW +: EW] == EMAX && a[FW-1:0] != 0) ||
            (b[FW +: EW] == EMAX && b[FW-1:0] != 0);
    if (ma == 0 && mb == 0)          begin eq = 1'b1; lt = 1'b0; end
    else if (a[EW+FW] != b[EW+FW])   begin eq = 1'b0; lt = a[EW+FW]; end
    else if (ma == mb)               begin eq = 1'b1; lt = 1'b0; end
    else                             begin eq = 1'b0; lt = a[EW+FW] ? (ma > mb) : (ma < mb); end
    unique case (cond)
      3'd0:    y = !unord && eq;
      3'd1:    y = unord || !eq;
      3'd2:    y = !unord && lt;
      3'd3:    y = !unord && (lt || eq);
      3'd4:    y = !unord && !lt && !eq;
      3'd5:    y = !unord && !lt;
      default: y = 1'b0;
    endcase
  end
endmodule
