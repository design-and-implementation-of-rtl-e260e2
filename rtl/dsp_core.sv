// dsp_core: the fixed-point DSP core: data address generator, dual-read
// internal data RAM and the CPU datapath, joined by the document's buses.
// Each cycle one decoded control word (dsp_pkg::core_ctrl_t) is applied:
//   DAGEN port D -> DAB -> RAM read port 0 -> DB
//   DAGEN port C -> CAB -> RAM read port 1 -> CB
//   control word immediate                  -> PB
//   CPU result bus EB -> RAM write port at DAB when mem_we
// so an instruction such as MAC reads two operands, multiplies and
// accumulates in one cycle (the single-cycle MAC the document stresses).
// The RAM here is DW = 16 bits wide to match the 16-bit buses of the CPU;
// its depth is the document's 10k words. The instruction decoder that
// would produce the control word is not part of this design (its encoding
// is not available), so the control word is a port.
module dsp_core
  import dsp_pkg::*;
#(
  parameter int unsigned RAM_DEPTH = 10240
) (
  input  logic        clk,
  input  logic        rst_n,
  input  core_ctrl_t  ctrl,
  output acc_t        acca,
  output acc_t        accb,
  output word_t       treg,
  output word_t       eb,
  output addr_t       dab,
  output addr_t       cab,
  output logic        ovf,
  output logic        sat,
  output logic        zero,
  output logic        pick_b
);
  word_t cb, db;
  addr_t ar [NAR];
  logic [8:0] dp;
  addr_t sp, bk;
  logic d_valid, c_valid;

  dagen u_dagen (
    .clk, .rst_n, .ctl_d(ctrl.dag_d), .ctl_c(ctrl.dag_c),
    .ar_we(ctrl.ar_we), .ar_sel(ctrl.ar_sel), .ar_din(ctrl.pb),
    .dp_we(ctrl.dp_we), .sp_we(ctrl.sp_we), .bk_we(ctrl.bk_we), .reg_din(ctrl.pb),
    .dab, .cab, .d_valid, .c_valid, .ar, .dp, .sp, .bk);

  data_ram #(.DEPTH(RAM_DEPTH), .WIDTH(DW), .AW(AW)) u_ram (
    .clk, .ra0(dab), .rd0(db), .ra1(cab), .rd1(cb),
    .we(ctrl.mem_we && d_valid), .wa(dab), .wd(eb));

  dsp_cpu u_cpu (
    .clk, .rst_n, .ctrl(ctrl.cpu), .pb(ctrl.pb), .cb, .db, .eb,
    .acca, .accb, .treg, .ovf, .sat, .zero, .pick_b);

  logic unused;
  assign unused = c_valid;
endmodule
