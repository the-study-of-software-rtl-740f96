// sddll_top: the software-defined delay-locked loop (SDDLL) platform. A CPU
// on a WISHBONE shared bus closes the DLL loop in software: it reads the
// phase state (lead/lag) and TDC measurements from the DLL and writes back
// the 24-bit digital control signal of the 8-stage multiphase delay line.
//
// Inside: the SACA system-clock generator (clocks everything on the bus),
// the shared bus, the 8MB data memory, the DLL's bus slave, the 8-order
// moving-average filter between the control register and the delay line,
// and the DLL hardware (DCDL, duty-cycle corrector, clock extender, PFD,
// pulse amplifier with one-pulse lock, TDC). The CPU and the program flash
// are external parts: the CPU's WISHBONE master port (m_*) and the flash's
// slave port (fl_*) are ports of this module, synchronous to sys_clk.
// Address map: adr[31:28] = 0 flash, 1 memory, 2 DLL registers (see
// dll_wb_regs for the register map). Contains behavioural timing models, so
// it simulates but does not synthesize as a whole.
`timescale 1ps/1fs
module sddll_top
  import sddll_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8388608,
  parameter int unsigned TDC_W     = 20
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  logic [6:0]        saca_stages,
  input  logic [7:0]        saca_mult,
  output logic              sys_clk,
  // CPU (WISHBONE master)
  input  logic              m_cyc,
  input  logic              m_stb,
  input  logic              m_we,
  input  logic [31:0]       m_adr,
  input  logic [31:0]       m_dat_w,
  input  logic [3:0]        m_sel,
  output logic              m_ack,
  output logic [31:0]       m_dat_r,
  // program flash (WISHBONE slave)
  output logic              fl_cyc,
  output logic              fl_stb,
  output logic              fl_we,
  output logic [31:0]       fl_adr,
  output logic [31:0]       fl_dat_w,
  output logic [3:0]        fl_sel,
  input  logic              fl_ack,
  input  logic [31:0]       fl_dat_r,
  // DLL outputs
  output logic [CTRL_W-1:0] dcdl_ctrl,
  output logic [7:0]        p_raw,
  output logic [7:0]        p_out
);

  logic [NSLV-1:0]    s_cyc, s_stb, s_ack;
  logic [NSLV*32-1:0] s_dat_r;
  logic               s_we;
  logic [31:0]        s_adr, s_dat_w;
  logic [3:0]         s_sel;

  logic [CTRL_W-1:0]  ctrl;
  logic               mux_sel, error_set, filt_en, ref_tick;
  logic               lead, lag, cmp_tgl, tdc_done;
  logic [TDC_W-1:0]   tdc_val;

  saca u_saca (.ref_clk(ref_clk), .stages(saca_stages), .mult(saca_mult), .sys_clk(sys_clk));

  wb_shared_bus u_bus (
    .clk(sys_clk), .rst_n(rst_n),
    .m_cyc(m_cyc), .m_stb(m_stb), .m_we(m_we), .m_adr(m_adr), .m_dat_w(m_dat_w), .m_sel(m_sel),
    .m_ack(m_ack), .m_dat_r(m_dat_r),
    .s_cyc(s_cyc), .s_stb(s_stb), .s_we(s_we), .s_adr(s_adr), .s_dat_w(s_dat_w), .s_sel(s_sel),
    .s_ack(s_ack), .s_dat_r(s_dat_r));

  // flash: external
  assign fl_cyc   = s_cyc[SLV_FLASH];
  assign fl_stb   = s_stb[SLV_FLASH];
  assign fl_we    = s_we;
  assign fl_adr   = s_adr;
  assign fl_dat_w = s_dat_w;
  assign fl_sel   = s_sel;
  assign s_ack[SLV_FLASH]              = fl_ack;
  assign s_dat_r[SLV_FLASH*32 +: 32]   = fl_dat_r;

  wb_ram #(.BYTES(MEM_BYTES)) u_mem (
    .clk(sys_clk), .rst_n(rst_n),
    .cyc(s_cyc[SLV_MEM]), .stb(s_stb[SLV_MEM]), .we(s_we), .adr(s_adr), .dat_w(s_dat_w), .sel(s_sel),
    .ack(s_ack[SLV_MEM]), .dat_r(s_dat_r[SLV_MEM*32 +: 32]));

  dll_wb_regs #(.TDC_W(TDC_W)) u_regs (
    .clk(sys_clk), .rst_n(rst_n),
    .cyc(s_cyc[SLV_DLL]), .stb(s_stb[SLV_DLL]), .we(s_we), .adr(s_adr), .dat_w(s_dat_w), .sel(s_sel),
    .ack(s_ack[SLV_DLL]), .dat_r(s_dat_r[SLV_DLL*32 +: 32]),
    .ctrl(ctrl), .mux_sel(mux_sel), .error_set(error_set), .filt_en(filt_en), .ctrl_filt(dcdl_ctrl),
    .ref_clk(ref_clk), .lead(lead), .lag(lag), .cmp_tgl(cmp_tgl),
    .tdc_val(tdc_val), .tdc_done(tdc_done), .ref_tick(ref_tick));

  ma_filter #(.W(CTRL_W), .ORDER(8)) u_filt (
    .clk(sys_clk), .rst_n(rst_n), .en(filt_en), .sample(ref_tick), .din(ctrl), .dout(dcdl_ctrl));

  dll_core #(.TDC_W(TDC_W)) u_dll (
    .ref_clk(ref_clk), .rst_n(rst_n), .ctrl_filt(dcdl_ctrl), .mux_sel(mux_sel), .error_set(error_set),
    .lead(lead), .lag(lag), .cmp_tgl(cmp_tgl), .tdc_val(tdc_val), .tdc_done(tdc_done),
    .p_raw(p_raw), .p_out(p_out));

endmodule
