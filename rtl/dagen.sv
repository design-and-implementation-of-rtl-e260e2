// dagen: data address generator. Eight 16-bit auxiliary registers AR0..AR7
// are shared by two auxiliary register arithmetic units (ARAUs), so two data
// addresses are produced in one cycle: port D drives the DAB address (read
// on DB, write on EB), port C drives CAB (read on CB).
//
// Addressing modes that produce an address:
//   absolute  address = offs (16 bits from the instruction)
//   direct    address = {DP[8:0], offs[6:0]}
//   indirect  address = ARn, then ARn is post-modified:
//             +1, -1, +AR0, -AR0, or +AR0/-AR0 with reverse carry
//             (bit-reversed index addressing, for FFT reordering),
//             or +1, -1, +AR0 modulo the buffer size BK (circular buffers,
//             the modulus logic of the address generators)
//   MMR       address = offs[6:0] on page 0 (memory-mapped registers)
//   stack     push: SP is decremented first and the new SP is the address;
//             pop: the address is SP, then SP is incremented (port D only)
// Short and long immediate modes carry the operand in the instruction and
// use no address. The eight mode names are the document's; DP/SP widths,
// the reverse-carry rule and the post-modify set are this design's choices
// (those of common fixed-point DSPs). A circular buffer of BK words starts
// at an address whose low bits (up to the first power of two >= BK) are
// zero; ARn stays inside it. If both ports modify the same AR in one cycle,
// port D's update wins.
//
// Addresses are combinational from the control words and the registers;
// AR, DP and SP update on the rising edge. `ar_we` loads an AR from `ar_din`
// (port D's own modification of that AR is then dropped).
module dagen
  import dsp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  dag_ctrl_t  ctl_d,
  input  dag_ctrl_t  ctl_c,
  input  logic       ar_we,
  input  logic [2:0] ar_sel,
  input  word_t      ar_din,
  input  logic       dp_we,
  input  logic       sp_we,
  input  logic       bk_we,
  input  word_t      reg_din,   // DP (bits 8:0), SP or BK load value
  output addr_t      dab,
  output addr_t      cab,
  output logic       d_valid,   // port D addresses memory this cycle
  output logic       c_valid,
  output addr_t      ar [NAR],
  output logic [8:0] dp,
  output addr_t      sp,
  output addr_t      bk
);
  // reverse-carry addition: add with the carry propagating from MSB to LSB
  function automatic addr_t bitrev(addr_t v);
    addr_t r;
    for (int i = 0; i < AW; i++) r[i] = v[AW-1-i];
    return r;
  endfunction

  // circular step: the buffer base is a with the low bits cleared, where the
  // low bits cover the smallest power of two >= size
  function automatic addr_t circ(addr_t a, addr_t step, logic down, addr_t size);
    addr_t mask, base, idx;
    logic [AW:0] n;
    mask = '0;
    for (int k = 0; k < AW; k++) if ((addr_t'(1) << k) < size) mask[k] = 1'b1;
    base = a & ~mask;
    idx  = a & mask;
    if (size == 0) return a;
    if (!down) begin
      n = {1'b0, idx} + {1'b0, step};
      if (n >= {1'b0, size}) n = n - {1'b0, size};
    end else begin
      if (idx >= step) n = {1'b0, idx - step};
      else             n = {1'b0, idx} + {1'b0, size} - {1'b0, step};
    end
    return base | addr_t'(n);
  endfunction

  function automatic addr_t post_mod(armod_e m, addr_t a, addr_t ar0, addr_t size);
    unique case (m)
      MOD_INC:   return a + 1'b1;
      MOD_DEC:   return a - 1'b1;
      MOD_INC0:  return a + ar0;
      MOD_DEC0:  return a - ar0;
      MOD_INC0B: return bitrev(bitrev(a) + bitrev(ar0));
      MOD_DEC0B: return bitrev(bitrev(a) - bitrev(ar0));
      MOD_INCC:  return circ(a, 1, 1'b0, size);
      MOD_DECC:  return circ(a, 1, 1'b1, size);
      MOD_INC0C: return circ(a, ar0, 1'b0, size);
      default:   return a;
    endcase
  endfunction

  function automatic addr_t gen_addr(dag_ctrl_t c, addr_t arv, logic [8:0] dpv, addr_t spv);
    unique case (c.mode)
      AM_ABS:      return c.offs;
      AM_DIRECT:   return {dpv, c.offs[6:0]};
      AM_INDIRECT: return arv;
      AM_MMR:      return {9'd0, c.offs[6:0]};
      AM_PUSH:     return spv - 1'b1;
      AM_POP:      return spv;
      default:     return '0;
    endcase
  endfunction

  assign dab     = gen_addr(ctl_d, ar[ctl_d.arn], dp, sp);
  assign cab     = gen_addr(ctl_c, ar[ctl_c.arn], dp, sp);
  assign d_valid = ctl_d.mode != AM_NONE;
  assign c_valid = ctl_c.mode != AM_NONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NAR; i++) ar[i] <= '0;
      dp <= '0;
      sp <= '0;
      bk <= '0;
    end else begin
      if (ctl_c.mode == AM_INDIRECT)
        ar[ctl_c.arn] <= post_mod(ctl_c.armod, ar[ctl_c.arn], ar[0], bk);
      if (ctl_d.mode == AM_INDIRECT)
        ar[ctl_d.arn] <= post_mod(ctl_d.armod, ar[ctl_d.arn], ar[0], bk);
      if (ar_we) ar[ar_sel] <= ar_din;
      if (dp_we) dp <= reg_din[8:0];
      if (bk_we) bk <= reg_din;
      if (sp_we)                     sp <= reg_din;
      else if (ctl_d.mode == AM_PUSH) sp <= sp - 1'b1;
      else if (ctl_d.mode == AM_POP)  sp <= sp + 1'b1;
    end
  end
endmodule
