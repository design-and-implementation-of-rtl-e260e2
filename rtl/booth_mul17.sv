// booth_mul17: 17 x 17 signed multiplier built the way the document draws it:
// a modified radix-4 Booth encoder, a partial product generator and a
// carry-save (Wallace-style) reduction tree, finished by one carry-propagate
// adder.
//
// The 17-bit multiplier y is recoded, three bits at a time with one bit of
// overlap, into 9 Booth digits in {-2,-1,0,+1,+2}. Each digit selects 0, +-x
// or +-2x, shifted by two bits per digit; a negative digit is formed as the
// one's complement plus a correction bit, as a hardware generator does. The
// 9 sign-extended partial products and the correction word are reduced with
// rows of 3:2 carry-save adders until two rows remain, which are added.
// The document gives the three stages and their names; the exact tree
// wiring is this design's own (any legal CSA order gives the same product).
//
// Purely combinational: the product is valid in the same cycle.
module booth_mul17 #(
  parameter int unsigned N = 17   // operand width
) (
  input  logic signed [N-1:0]   x,  // multiplicand
  input  logic signed [N-1:0]   y,  // multiplier (Booth-recoded)
  output logic signed [2*N-1:0] p   // product
);
  localparam int unsigned PW  = 2*N;        // product width
  localparam int unsigned NPP = (N+2)/2;    // Booth digits (9 for N = 17)
  localparam int unsigned NR  = NPP + 1;    // rows incl. correction row

  logic [PW-1:0] rows [NR];

  // Booth encoder and partial product generator
  always_comb begin
    logic [N+1:0]  yext;          // y sign-extended, with y[-1] = 0 below
    logic [2:0]    trip;
    logic [PW-1:0] mag, pp, corr;
    yext = {{1{y[N-1]}}, y, 1'b0};
    corr = '0;
    for (int i = 0; i < NPP; i++) begin
      trip = yext[2*i +: 3];
      unique case (trip)
        3'b001, 3'b010: mag = PW'(signed'(x));            // +x
        3'b101, 3'b110: mag = PW'(signed'(x));            // -x
        3'b011, 3'b100: mag = PW'(signed'(x)) << 1;        // +-2x
        default:        mag = '0;                          // 0
      endcase
      if (trip[2] && trip != 3'b111) begin
        pp = ~mag;                  // one's complement ...
        corr[2*i] = 1'b1;           // ... plus one in the correction row
      end else begin
        pp = mag;
      end
      rows[i] = pp << (2*i);
    end
    rows[NPP] = corr;
  end

  // Wallace-style reduction with 3:2 carry-save adders
  always_comb begin
    logic [PW-1:0] r [NR];
    logic [PW-1:0] s, c;
    int n, k;
    for (int i = 0; i < NR; i++) r[i] = rows[i];
    n = NR;
    while (n > 2) begin
      k = 0;
      for (int i = 0; i + 2 < n; i += 3) begin
        s = r[i] ^ r[i+1] ^ r[i+2];
        c = ((r[i] & r[i+1]) | (r[i] & r[i+2]) | (r[i+1] & r[i+2])) << 1;
        r[k] = s;  r[k+1] = c;  k += 2;
      end
      for (int i = (n/3)*3; i < n; i++) begin
        r[k] = r[i];  k++;
      end
      n = k;
    end
    p = signed'(r[0] + r[1]);
  end

endmodule
