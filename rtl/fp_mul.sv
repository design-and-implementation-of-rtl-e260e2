// fp_mul: IEEE-754 binary floating-point multiplier, single or double by
// parameter (mul.s, mul.d). Significands (with hidden bit) are multiplied
// exactly, the product is normalised by at most one place, rounded to
// nearest even using a guard bit and a sticky bit, and the exponents are
// added less the bias. Subnormal inputs count as zero, underflow flushes to
// zero, overflow gives infinity, NaN or 0 x inf give the default quiet NaN.
// The special-case policy is this design's choice. Combinational.
module fp_mul #(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] a,
  input  logic [EW+FW:0] b,
  output logic [EW+FW:0] y
);
  localparam int unsigned M    = FW + 1;
  localparam int          BIAS = (1 << (EW-1)) - 1;
  localparam logic [EW-1:0] EMAX = '1;

  always_comb begin
    logic          s, azero, bzero, ainf, binf, anan, bnan;
    logic [EW-1:0] ea, eb;
    logic [2*M-1:0] p, n;
    logic [M:0]    r;
    logic          g, st;
    int            e;
    ea = a[FW +: EW]; eb = b[FW +: EW];
    s  = a[EW+FW] ^ b[EW+FW];
    azero = ea == 0;  bzero = eb == 0;
    ainf  = ea == EMAX && a[FW-1:0] == 0;  binf = eb == EMAX && b[FW-1:0] == 0;
    anan  = ea == EMAX && a[FW-1:0] != 0;  bnan = eb == EMAX && b[FW-1:0] != 0;
    y = '0;
    p = '0; n = '0; r = '0; g = 0; st = 0; e = 0;
    if (anan || bnan || (ainf && bzero) || (binf && azero))
      y = {1'b0, EMAX, 1'b1, {(FW-1){1'b0}}};
    else if (ainf || binf)
      y = {s, EMAX, {FW{1'b0}}};
    else if (azero || bzero)
      y = {s, {(EW+FW){1'b0}}};
    else begin
      p = {1'b1, a[FW-1:0]} * {1'b1, b[FW-1:0]};
      e = int'(ea) + int'(eb) - BIAS;
      if (p[2*M-1]) begin n = p; e = e + 1; end
      else          n = p << 1;
      // n[2M-1] is the hidden bit; keep M bits, then guard and sticky
      r  = {1'b0, n[2*M-1 -: M]};
      g  = n[M-1];
      st = |n[M-2:0];
      if (g && (st || r[0])) r = r + 1'b1;
      if (r[M]) begin r = r >> 1; e = e + 1; end
      if (e >= int'(EMAX)) y = {s, EMAX, {FW{1'b0}}};
      else if (e <= 0)     y = {s, {(EW+FW){1'b0}}};
      else                 y = {s, EW'(e), r[FW-1:0]};
    end
  end
endmodule
