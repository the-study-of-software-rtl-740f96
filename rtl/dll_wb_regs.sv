// dll_wb_regs: the DLL's WISHBONE slave, through which the CPU reads the
// phase state and the TDC output and writes the digital control signal.
//
// Registers (byte offsets, 32-bit words; the map is this design's choice):
//   0x00 CTRL   RW  [23:0] digital control signal C1|C2|F1|F2|F3
//   0x04 CONFIG RW  [0] mux_sel (0 extended pulse, 1 phase error)
//                   [1] error_set (1 clears and re-arms the one-pulse lock)
//                   [2] filt_en (moving-average filter on)
//   0x08 STATUS RO  [0] lead [1] lag [15:8] count of phase comparisons
//                   [16] tdc_done
//   0x0C TDC    RO  TDC output
//   0x10 FILT   RO  control word after the filter
// Lead/lag, the comparison toggle, the TDC done flag and the reference clock
// come from the reference/analog domain and pass through two-flop
// synchronizers. The comparison counter advances on each toggle of cmp_tgl,
// so software can spin until a new phase state arrives; lead/lag are
// captured at that moment (the PFD settles them before it toggles). The TDC
// value is captured while the synchronized done flag is high. ref_tick is a
// one-cycle pulse per reference rising edge, used as the filter's sample
// strobe. Ack is registered: one cycle after stb.
`timescale 1ps/1fs
module dll_wb_regs
  import sddll_pkg::*;
#(
  parameter int unsigned TDC_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // WISHBONE slave
  input  logic              cyc,
  input  logic              stb,
  input  logic              we,
  input  logic [31:0]       adr,
  input  logic [31:0]       dat_w,
  input  logic [3:0]        sel,
  output logic              ack,
  output logic [31:0]       dat_r,
  // to the DLL
  output logic [CTRL_W-1:0] ctrl,
  output logic              mux_sel,
  output logic              error_set,
  output logic              filt_en,
  input  logic [CTRL_W-1:0] ctrl_filt,
  // from the DLL (asynchronous)
  input  logic              ref_clk,
  input  logic              lead,
  input  logic              lag,
  input  logic              cmp_tgl,
  input  logic [TDC_W-1:0]  tdc_val,
  input  logic              tdc_done,
  output logic              ref_tick
);

  logic [2:0] ref_s, tgl_s;
  logic [1:0] done_s;
  logic       lead_r, lag_r;
  logic [7:0] cmp_cnt;
  logic [TDC_W-1:0] tdc_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_s   <= '0;
      tgl_s   <= '0;
      done_s  <= '0;
      lead_r  <= 1'b0;
      lag_r   <= 1'b0;
      cmp_cnt <= '0;
      tdc_r   <= '0;
    end else begin
      ref_s  <= {ref_s[1:0], ref_clk};
      tgl_s  <= {tgl_s[1:0], cmp_tgl};
      done_s <= {done_s[0], tdc_done};
      if (tgl_s[2] != tgl_s[1]) begin
        cmp_cnt <= cmp_cnt + 8'd1;
        lead_r  <= lead;
        lag_r   <= lag;
      end
      if (done_s[1]) tdc_r <= tdc_val;
    end
  end

  assign ref_tick = ref_s[1] & ~ref_s[2];

  // register writes and reads
  logic [7:0] off;
  assign off = adr[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl      <= '0;
      mux_sel   <= 1'b0;
      error_set <= 1'b1;
      filt_en   <= 1'b0;
      ack       <= 1'b0;
      dat_r     <= '0;
    end else begin
      ack <= cyc && stb && !ack;
      if (cyc && stb && !ack) begin
        if (we) begin
          unique case (off)
            REG_CTRL: begin
              if (sel[0]) ctrl[7:0]   <= dat_w[7:0];
              if (sel[1]) ctrl[15:8]  <= dat_w[15:8];
              if (sel[2]) ctrl[23:16] <= dat_w[23:16];
            end
            REG_CONFIG: if (sel[0]) {filt_en, error_set, mux_sel} <= dat_w[2:0];
            default: ;
          endcase
        end
        unique case (off)
          REG_CTRL:   dat_r <= 32'(ctrl);
          REG_CONFIG: dat_r <= {29'd0, filt_en, error_set, mux_sel};
          REG_STATUS: dat_r <= {15'd0, done_s[1], cmp_cnt, 6'd0, lag_r, lead_r};
          REG_TDC:    dat_r <= 32'(tdc_r);
          REG_FILT:   dat_r <= 32'(ctrl_filt);
          default:    dat_r <= '0;
        endcase
      end
    end
  end

endmodule
