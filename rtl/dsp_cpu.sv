// dsp_cpu: the fixed-point CPU datapath. Operands come in on the 16-bit
// buses CB and DB (data reads) and PB (program bus immediate); results go
// to the accumulators ACCA/ACCB (40 bits: 8 guard, 16 high, 16 low) or out on
// EB (data write bus).
//
// Structure, after the document's CPU figure:
//  * T register, loaded from DB or from the exponent encoder.
//  * Sign controls in front of every unit extend 16-bit operands by sign
//    (sxm = 1) or by zeros; accumulator operands pass unchanged.
//  * MAU: 17x17 Booth multiplier (X from T, DB or ACCA high word; Y from CB,
//    DB or PB), optional fractional doubling, 40-bit adder with 0/ACCA/ACCB,
//    then ZERO/SAT/ROUND.
//  * ALU (40 bits): A from ACCA, ACCB or DB; B from any bus, accumulator or
//    the barrel shifter output, so "shift then add" is a single cycle.
//  * Barrel shifter (-16..31) from CB, DB, ACCA or ACCB; the count is the
//    control word's, or T when the control word's count is -32 (a code the
//    range never uses). Its output feeds the ALU, the accumulators and, via
//    the MSW/LSW select, EB.
//  * EXP encoder on ACCA or ACCB; CSSU for MIN/MAX of the two accumulators.
// A parallel instruction such as LD||MAC writes both accumulators in one
// cycle: the selected result (e.g. an ALU load) goes to the destination
// accumulator and the MAU result to the other one (mau_par).
// One control word per cycle (see dsp_pkg::cpu_ctrl_t); everything is
// combinational up to the accumulators and T, which update on the rising
// clock edge. EB is combinational from the current operands. The decoded
// control word and the T-as-count code are this design's own.
module dsp_cpu
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cpu_ctrl_t   ctrl,
  input  word_t       pb,
  input  word_t       cb,
  input  word_t       db,
  output word_t       eb,
  output acc_t        acca,
  output acc_t        accb,
  output word_t       treg,
  output logic        ovf,     // ALU overflow in this cycle
  output logic        sat,     // MAU saturated in this cycle
  output logic        zero,    // selected result is zero
  output logic        pick_b   // CSSU decision
);
  acc_t cb_x, db_x, pb_x, sh_out, alu_a, alu_b, alu_y, mau_y, cssu_y, res;
  logic signed [16:0] mx, my;
  logic signed [5:0]  expo, sh_amt;
  logic alu_ovf, alu_zero, alu_c, mau_zero, mau_sat;

  // sign controls
  function automatic acc_t ext16(word_t w, logic sxm);
    return sxm ? acc_t'(signed'(w)) : acc_t'(w);
  endfunction
  function automatic logic signed [16:0] ext17(word_t w, logic sxm);
    return sxm ? 17'(signed'(w)) : {1'b0, w};
  endfunction

  assign cb_x = ext16(cb, ctrl.sxm);
  assign db_x = ext16(db, ctrl.sxm);
  assign pb_x = ext16(pb, ctrl.sxm);

  // barrel shifter
  always_comb begin
    unique case (ctrl.sh_src)
      SRC_CB:   sh_out = cb_x;
      SRC_DB:   sh_out = db_x;
      SRC_ACCA: sh_out = acca;
      SRC_ACCB: sh_out = accb;
      SRC_PB:   sh_out = pb_x;
      default:  sh_out = '0;
    endcase
  end
  assign sh_amt = (ctrl.sh_amt == -6'sd32) ? 6'(signed'(treg)) : ctrl.sh_amt;

  acc_t sh_y;
  barrel_shifter u_shift (.din(sh_out), .amt(sh_amt), .arith(ctrl.sh_arith), .dout(sh_y));
  assign eb = ctrl.sh_msw ? sh_y[31:16] : sh_y[15:0];

  // MAU
  always_comb begin
    unique case (ctrl.mul_x)
      MX_T:       mx = ext17(treg, ctrl.sxm);
      MX_DB:      mx = ext17(db, ctrl.sxm);
      default:    mx = ext17(acca[31:16], 1'b1);
    endcase
    unique case (ctrl.mul_y)
      MY_CB:   my = ext17(cb, ctrl.sxm);
      MY_DB:   my = ext17(db, ctrl.sxm);
      default: my = ext17(pb, ctrl.sxm);
    endcase
  end

  acc_t mau_c;
  always_comb begin
    unique case (ctrl.mau_c)
      MC_ACCA: mau_c = acca;
      MC_ACCB: mau_c = accb;
      default: mau_c = '0;
    endcase
  end

  mau u_mau (.a(mx), .b(my), .c(mau_c), .neg(ctrl.mau_neg), .frct(ctrl.frct),
             .rnd(ctrl.mau_rnd), .ovm(ctrl.ovm), .y(mau_y), .zero(mau_zero), .sat(mau_sat));

  // ALU
  function automatic acc_t pick(src_e s, acc_t c, acc_t d, acc_t p, acc_t a, acc_t b, acc_t sh);
    unique case (s)
      SRC_CB:    return c;
      SRC_DB:    return d;
      SRC_PB:    return p;
      SRC_ACCA:  return a;
      SRC_ACCB:  return b;
      SRC_SHIFT: return sh;
      default:   return '0;
    endcase
  endfunction

  assign alu_a = pick(ctrl.alu_a, cb_x, db_x, pb_x, acca, accb, sh_y);
  assign alu_b = pick(ctrl.alu_b, cb_x, db_x, pb_x, acca, accb, sh_y);

  alu40 u_alu (.op(ctrl.alu_op), .a(alu_a), .b(alu_b), .ovm(ctrl.ovm), .y(alu_y),
               .ovf(alu_ovf), .zero(alu_zero), .carry(alu_c));

  // EXP encoder and CSSU
  exp_encoder u_exp (.acc(ctrl.exp_b ? accb : acca), .expo(expo));
  cssu u_cssu (.acca(acca), .accb(accb), .max_n_min(ctrl.cssu_max), .y(cssu_y), .pick_b(pick_b));

  // accumulator input mux
  always_comb begin
    unique case (ctrl.acc_res)
      RES_ALU:   res = alu_y;
      RES_MAU:   res = mau_y;
      RES_SHIFT: res = sh_y;
      default:   res = cssu_y;
    endcase
  end

  assign ovf  = alu_ovf && (ctrl.acc_res == RES_ALU);
  assign sat  = mau_sat && (ctrl.acc_res == RES_MAU);
  assign zero = (res == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acca <= '0;
      accb <= '0;
      treg <= '0;
    end else begin
      if (ctrl.acc_we && !ctrl.acc_dst) acca <= res;
      if (ctrl.acc_we &&  ctrl.acc_dst) accb <= res;
      // parallel LD||MAC: the MAU result goes to the other accumulator
      if (ctrl.mau_par &&  ctrl.acc_dst) acca <= mau_y;
      if (ctrl.mau_par && !ctrl.acc_dst) accb <= mau_y;
      if (ctrl.t_exp)       treg <= word_t'(signed'(expo));
      else if (ctrl.t_load) treg <= db;
    end
  end
endmodule
