// dll_core: the DLL hardware of the platform. The reference clock feeds the
// 8-stage multiphase DCDL, the clock extender and the PFD. The last DCDL
// phase p_raw[7] is fed back to the PFD. A multiplexer picks either the
// extended pulse (period measurement, mux_sel = 0) or the PFD phase-error
// pulse (mux_sel = 1) for the pulse amplifier with one-pulse lock, whose
// output the TDC measures. The duty-cycle corrector turns the eight DCDL
// phases into eight 50%-duty phases.
//
// Lead/lag, the comparison toggle and the TDC result are asynchronous to the
// system clock; the bus slave synchronizes them. The control word is
// expected to come from the moving-average filter. Contains behavioural
// timing models, so this block is a behavioural model as a whole.
`timescale 1ps/1fs
module dll_core
  import sddll_pkg::*;
#(
  parameter int unsigned TDC_W = 20
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  logic [CTRL_W-1:0] ctrl_filt,
  input  logic              mux_sel,
  input  logic              error_set,
  output logic              lead,
  output logic              lag,
  output logic              cmp_tgl,
  output logic [TDC_W-1:0]  tdc_val,
  output logic              tdc_done,
  output logic [7:0]        p_raw,
  output logic [7:0]        p_out
);

  logic ext_pulse, phase_err, mux_out, amp_out;

  multiphase_dcdl u_dcdl (.ref_clk(ref_clk), .ctrl(ctrl_filt), .p(p_raw));

  duty_cycle_corrector u_dcc (.p(p_raw), .p_new(p_out));

  clock_extender u_ext (.ref_clk(ref_clk), .rst_n(rst_n), .ext_pulse(ext_pulse));

  pfd u_pfd (.rst_n(rst_n), .ref_clk(ref_clk), .fb_clk(p_raw[7]), .lead(lead), .lag(lag),
             .cmp_tgl(cmp_tgl), .phase_err(phase_err));

  assign mux_out = mux_sel ? phase_err : ext_pulse;

  opl_pa u_opl (.in_pulse(mux_out), .error_set(error_set), .out_pulse(amp_out));

  tdc #(.W(TDC_W)) u_tdc (.in_pulse(amp_out), .clr(error_set), .value(tdc_val), .done(tdc_done));

endmodule
