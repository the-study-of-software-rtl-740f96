// clock_extender: turns the reference clock into an "extended pulse" one full
// reference period long, which the TDC measures to estimate the period.
//
// It is a divide-by-2: a toggle flip-flop on the reference rising edge, so the
// output is high for one reference period and low for the next. The first
// rising edge after reset raises the output.
`timescale 1ps/1fs
module clock_extender (
  input  logic ref_clk,
  input  logic rst_n,
  output logic ext_pulse
);

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) ext_pulse <= 1'b0;
    else        ext_pulse <= ~ext_pulse;
  end

endmodule
