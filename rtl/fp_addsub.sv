// fp_addsub: IEEE-754 binary floating-point adder/subtractor, single
// (EW = 8, FW = 23) or double (EW = 11, FW = 52) precision by parameter,
// for add.s/sub.s/add.d/sub.d.
// Steps: unpack, order the operands by magnitude, align the smaller
// significand with guard, round and sticky bits, add or subtract,
// normalise (one step right on carry, a leading-zero count to the left),
// round to nearest even, pack. Subnormal inputs are treated as zero and
// results below the normal range flush to zero; overflow gives infinity;
// a NaN or infinity input gives the IEEE result for the simple cases
// (inf - inf and NaN inputs give the default quiet NaN). The flush-to-zero
// choice is this design's; the document names only the instructions.
// Combinational.
module fp_addsub #(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] a,
  input  logic [EW+FW:0] b,
  input  logic           sub,   // 1: a - b
  output logic [EW+FW:0] y
);
  localparam int unsigned M   = FW + 1;      // significand with hidden bit
  localparam int unsigned XW  = M + 3;       // + guard, round, sticky
  localparam logic [EW-1:0] EMAX = '1;

  always_comb begin
    logic          sa, sb, sx, sy;
    logic [EW-1:0] ea, eb, ex, ey;
    logic [M-1:0]  ma, mb, mx, my;
    logic [XW-1:0] ax, bx;
    logic [XW:0]   s;
    logic [XW-1:0] n;
    logic [M:0]    r;
    int            d, lz, e;
    logic          g, rb, st, sticky;

    sa = a[EW+FW];       ea = a[FW +: EW];  ma = {ea != 0, a[FW-1:0]};
    sb = b[EW+FW] ^ sub; eb = b[FW +: EW];  mb = {eb != 0, b[FW-1:0]};
    if (ea == 0) ma = '0;
    if (eb == 0) mb = '0;
    y = '0;
    sx = 0; sy = 0; ex = '0; ey = '0; mx = '0; my = '0; ax = '0; bx = '0; s = '0; n = '0;
    r = '0; d = 0; lz = 0; e = 0; g = 0; rb = 0; st = 0; sticky = 0;

    if (ea == EMAX || eb == EMAX) begin
      // special operands
      if ((ea == EMAX && a[FW-1:0] != 0) || (eb == EMAX && b[FW-1:0] != 0) ||
          (ea == EMAX && eb == EMAX && sa != sb))
        y = {1'b0, EMAX, 1'b1, {(FW-1){1'b0}}};
      else if (ea == EMAX) y = {sa, EMAX, {FW{1'b0}}};
      else                 y = {sb, EMAX, {FW{1'b0}}};
    end else begin
      // order by magnitude: x is the larger
      if ({ea, ma} >= {eb, mb}) begin
        sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
      end else begin
        sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
      end
      if (mx == 0) begin
        y = {sa & sb, {(EW+FW){1'b0}}};        // both zero
      end else begin
        d  = int'(ex) - int'(ey);
        ax = {mx, 3'b000};
        bx = {my, 3'b000};
        sticky = 1'b0;
        if (my == 0) bx = '0;
        else if (d >= XW) begin
          sticky = 1'b1; bx = '0;
        end else if (d > 0) begin
          for (int i = 0; i < XW; i++) if (i < d && bx[i]) sticky = 1'b1;
          bx = bx >> d;
        end
        bx[0] = bx[0] | sticky;
        s  = (sx == sy) ? {1'b0, ax} + {1'b0, bx} : {1'b0, ax} - {1'b0, bx};
        e  = int'(ex);
        if (s == 0) begin
          y = '0;                               // exact cancellation: +0
        end else begin
          if (s[XW]) begin                      // carry: shift right once
            n = s[XW:1];
            n[0] = n[0] | s[0];
            e = e + 1;
          end else begin
            lz = 0;
            for (int i = XW-1; i >= 0; i--) if (s[i] == 1'b0 && lz == XW-1-i) lz++;
            n = s[XW-1:0] << lz;
            e = e - lz;
          end
          g  = n[2]; rb = n[1]; st = n[0];
          r  = {1'b0, n[XW-1:3]};
          if (g && (rb || st || r[0])) r = r + 1'b1;
          if (r[M]) begin r = r >> 1; e = e + 1; end
          if (e >= int'(EMAX))  y = {sx, EMAX, {FW{1'b0}}};
          else if (e <= 0)      y = {sx, {(EW+FW){1'b0}}};
          else                  y = {sx, EW'(e), r[FW-1:0]};
        end
      end
    end
  end
endmodule
