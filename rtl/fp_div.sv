// fp_div: IEEE-754 single-precision divider (div.s). The quotient of the two
// significands is formed by one wide integer division with two extra
// quotient bits and a sticky bit from the remainder, normalised by at most
// one place and rounded to nearest even; the exponent is the difference of
// the exponents plus the bias. x/0 gives infinity, 0/0, inf/inf and NaN
// inputs give the default quiet NaN, subnormals count as zero and underflow
// flushes to zero. The document names only the instruction: this
// single-cycle combinational divider is the simplest unit that performs it,
// a sequential divider being the usual faster-clock alternative.
module fp_div #(
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
  localparam int unsigned QW   = 2*M + 2;

  always_comb begin
    logic          s, azero, bzero, ainf, binf, anan, bnan;
    logic [EW-1:0] ea, eb;
    logic [QW-1:0] num, den, q, rem;
    logic [M:0]    r;
    logic          g, st;
    int            e;
    ea = a[FW +: EW]; eb = b[FW +: EW];
    s  = a[EW+FW] ^ b[EW+FW];
    azero = ea == 0;  bzero = eb == 0;
    ainf  = ea == EMAX && a[FW-1:0] == 0;  binf = eb == EMAX && b[FW-1:0] == 0;
    anan  = ea == EMAX && a[FW-1:0] != 0;  bnan = eb == EMAX && b[FW-1:0] != 0;
    y = '0;
    num = '0; den = '0; q = '0; rem = '0; r = '0; g = 0; st = 0; e = 0;
    if (anan || bnan || (azero && bzero) || (ainf && binf))
      y = {1'b0, EMAX, 1'b1, {(FW-1){1'b0}}};
    else if (ainf || bzero)
      y = {s, EMAX, {FW{1'b0}}};
    else if (azero || binf)
      y = {s, {(EW+FW){1'b0}}};
    else begin
      num = QW'({1'b1, a[FW-1:0]}) << (M + 1);
      den = QW'({1'b1, b[FW-1:0]});
      q   = num / den;                 // M+1 or M+2 significant bits
      rem = num % den;
      e   = int'(ea) - int'(eb) + BIAS;
      if (q[M+1]) begin
        // ratio in [1,2): significand q[M+1:2], guard q[1]
        r  = {1'b0, q[M+1:2]};
        g  = q[1];
        st = q[0] || rem != 0;
      end else begin
        // ratio in (0.5,1): significand q[M:1], guard q[0]
        r  = {1'b0, q[M:1]};
        g  = q[0];
        st = rem != 0;
        e  = e - 1;
      end
      if (g && (st || r[0])) r = r + 1'b1;
      if (r[M]) begin r = r >> 1; e = e + 1; end
      if (e >= int'(EMAX)) y = {s, EMAX, {FW{1'b0}}};
      else if (e <= 0)     y = {s, {(EW+FW){1'b0}}};
      else                 y = {s, EW'(e), r[FW-1:0]};
    end
  end
endmodule
