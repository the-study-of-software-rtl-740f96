// pfd: behavioural model of the DLL's phase/frequency detector. It compares
// the reference clock with the last DCDL phase and reports, once per
// reference period, whether the delayed clock leads or lags, plus a pulse as
// wide as the phase difference for the TDC. Its insides are not given, so it
// is modelled by edge timestamps, not gates.
//
// Each feedback rising edge is paired with the nearest reference rising edge
// (half a reference period either way):
//   feedback first  -> lead = 1 (the delay must grow),
//   reference first -> lag  = 1 (the delay must shrink).
// When a comparison completes, lead/lag are updated, cmp_tgl toggles and
// phase_err goes high for |difference| + T_MIN_PS (the minimum error pulse,
// 200ps). lead/lag keep their value until the next comparison. Feedback edges
// are ignored until two reference edges have given a period. The 45ps
// detection dead zone of the real circuit is not modelled.
`timescale 1ps/1fs
module pfd #(
  parameter real T_MIN_PS = 200.0
) (
  input  logic rst_n,
  input  logic ref_clk,
  input  logic fb_clk,
  output logic lead,
  output logic lag,
  output logic cmp_tgl,
  output logic phase_err
);

  realtime t_ref, t_fb, t_per, pe_width;
  bit      have_ref, fb_pend;
  event    pe_ev;

  initial begin
    lead = 1'b0; lag = 1'b0; cmp_tgl = 1'b0; phase_err = 1'b0;
    have_ref = 1'b0; fb_pend = 1'b0; t_ref = 0; t_fb = 0; t_per = 0; pe_width = 0;
  end

  always @(negedge rst_n) begin
    have_ref = 1'b0; fb_pend = 1'b0; t_per = 0;
    lead = 1'b0; lag = 1'b0;
  end

  always @(posedge ref_clk) if (rst_n) begin
    if (have_ref) t_per = $realtime - t_ref;
    if (fb_pend) begin
      fb_pend  = 1'b0;
      lead     = 1'b1;
      lag      = 1'b0;
      pe_width = ($realtime - t_fb) + T_MIN_PS;
      cmp_tgl  = ~cmp_tgl;
      -> pe_ev;
    end
    t_ref    = $realtime;
    have_ref = 1'b1;
  end

  always @(posedge fb_clk) if (rst_n && t_per > 0) begin
    if ($realtime - t_ref <= t_per / 2) begin
      lead     = 1'b0;
      lag      = 1'b1;
      pe_width = ($realtime - t_ref) + T_MIN_PS;
      cmp_tgl  = ~cmp_tgl;
      -> pe_ev;
    end else begin
      fb_pend = 1'b1;
      t_fb    = $realtime;
    end
  end

  always @(pe_ev) begin
    phase_err = 1'b1;
    #(pe_width) phase_err = 1'b0;
  end

endmodule
