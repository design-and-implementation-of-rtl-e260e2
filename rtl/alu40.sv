// alu40: the 40-bit adder and logic unit of the DSP CPU.
// Operations: ADD, SUB (a - b), AND, OR, XOR, PASSB (load b) and NOT (~a).
// Operands arrive already sign- or zero-extended to 40 bits by the sign
// controls. With ovm set, ADD/SUB/PASSB results are clamped to the 32-bit
// signed range, and the overflow flag reports a 40-bit two's-complement
// overflow of ADD/SUB. The document gives the 40-bit adder and the logic
// operations; the operation list, flags and saturation range are this
// design's choice. Combinational.
module alu40
  import dsp_pkg::*;
#(
  parameter int unsigned W = 40
) (
  input  alu_op_e       op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          ovm,
  output logic [W-1:0]  y,
  output logic          ovf,    // 40-bit overflow of ADD/SUB
  output logic          zero,
  output logic          carry   // carry out of ADD / borrow-free of SUB
);
  localparam logic signed [W-1:0] SMAX = W'(64'sh7FFF_FFFF);
  localparam logic signed [W-1:0] SMIN = ~SMAX;

  logic [W:0] s;
  logic       arith;

  always_comb begin
    s     = '0;
    ovf   = 1'b0;
    arith = 1'b0;
    unique case (op)
      ALU_ADD: begin
        s = {1'b0, a} + {1'b0, b};
        ovf = (a[W-1] == b[W-1]) && (s[W-1] != a[W-1]);
        arith = 1'b1;
      end
      ALU_SUB: begin
        s = {1'b0, a} + {1'b0, ~b} + (W+1)'(1);
        ovf = (a[W-1] != b[W-1]) && (s[W-1] != a[W-1]);
        arith = 1'b1;
      end
      ALU_AND:   s = {1'b0, a & b};
      ALU_OR:    s = {1'b0, a | b};
      ALU_XOR:   s = {1'b0, a ^ b};
      ALU_PASSB: begin s = {1'b0, b}; arith = 1'b1; end
      ALU_NOT:   s = {1'b0, ~a};
      default:   s = '0;
    endcase
    carry = s[W];
    y     = s[W-1:0];
    if (ovm && arith) begin
      if (ovf) y = a[W-1] ? SMIN : SMAX;            // 40-bit overflow
      else if (signed'(y) > SMAX) y = SMAX;
      else if (signed'(y) < SMIN) y = SMIN;
    end
    zero = (y == '0);
  end
endmodule
