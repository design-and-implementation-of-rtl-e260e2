// sharc_top: the processor top. Two engines stand side by side, as in the
// design they come from:
//  * the fixed-point DSP core (dsp_core): 40-bit ALU and accumulators, the
//    single-cycle MAC unit with its 17x17 Booth multiplier, the -16..31
//    barrel shifter, exponent encoder and compare-select-store unit, fed by
//    two auxiliary-register address generators over a dual-read data RAM;
//  * the MIPS floating-point pipeline (mips_fp_pipeline) with its
//    instruction cache, fetching from the 2k x 32 program ROM and loading
//    and storing through its own 10k x 32 data RAM.
// The Super Harvard split is kept: program memory and its bus are separate
// from data memory and its buses, and loops run from the instruction cache.
// The DSP core is driven by a decoded control word per cycle (its
// instruction decoder is not part of this design); the program ROM is
// filled through its load port while the MIPS pipeline is held in reset
// (mips_rst_n low). All sizes default to the document's values.
module sharc_top
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // fixed-point DSP core
  input  core_ctrl_t  dsp_ctrl,
  output acc_t        dsp_acca,
  output acc_t        dsp_accb,
  output word_t       dsp_treg,
  output word_t       dsp_eb,
  output addr_t       dsp_dab,
  output addr_t       dsp_cab,
  output logic        dsp_ovf,
  output logic        dsp_sat,
  output logic        dsp_zero,
  output logic        dsp_pick_b,
  // MIPS floating-point pipeline
  input  logic        mips_rst_n,
  input  logic        rom_load_we,
  input  logic [15:0] rom_load_addr,
  input  logic [31:0] rom_load_data,
  input  logic        gpr_we,
  input  logic [4:0]  gpr_wa,
  input  logic [31:0] gpr_wd,
  input  logic [15:0] dbg_daddr,      // second data RAM read port, for inspection
  output logic [31:0] dbg_ddata,
  output logic [31:0] mips_pc,
  output logic        mips_fcc,
  output logic        mips_icache_miss,
  output logic        mips_flush,
  output logic        mips_retire
);
  dsp_core u_dsp (
    .clk, .rst_n, .ctrl(dsp_ctrl), .acca(dsp_acca), .accb(dsp_accb), .treg(dsp_treg),
    .eb(dsp_eb), .dab(dsp_dab), .cab(dsp_cab), .ovf(dsp_ovf), .sat(dsp_sat),
    .zero(dsp_zero), .pick_b(dsp_pick_b));

  logic [15:0] pmem_addr, dmem_addr;
  logic [31:0] pmem_data, dmem_wdata, dmem_rdata;
  logic        dmem_we;
  logic        m_rst_n;

  assign m_rst_n = rst_n && mips_rst_n;

  prog_rom u_rom (
    .clk, .addr(pmem_addr), .data(pmem_data),
    .load_we(rom_load_we), .load_addr(rom_load_addr), .load_data(rom_load_data));

  data_ram u_dram (
    .clk, .ra0(dmem_addr), .rd0(dmem_rdata), .ra1(dbg_daddr), .rd1(dbg_ddata),
    .we(dmem_we), .wa(dmem_addr), .wd(dmem_wdata));

  mips_fp_pipeline u_mips (
    .clk, .rst_n(m_rst_n), .pmem_addr, .pmem_data, .dmem_addr, .dmem_we, .dmem_wdata,
    .dmem_rdata, .gpr_we, .gpr_wa, .gpr_wd, .pc(mips_pc), .fcc(mips_fcc),
    .icache_miss(mips_icache_miss), .flush(mips_flush), .retire(mips_retire));
endmodule
