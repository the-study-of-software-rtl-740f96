// saca: behavioural model of the semi-asynchronous clock access (SACA)
// system-clock generator, a digitally controlled oscillator that restarts on
// every reference rising edge.
//
// The clock period is stages * T_STAGE_PS (140ps per stage, 1..64 stages;
// values outside are clamped). After each reference rising edge the clock
// starts a new cycle (rising first) and runs `mult` cycles, then stays low
// until the next reference edge; mult = 0 means run until that edge. A
// reference edge that arrives mid-cycle takes effect when the cycle ends, so
// the output never glitches. The clock is idle (low) before the first
// reference edge.
`timescale 1ps/1fs
module saca #(
  parameter real         T_STAGE_PS = 140.0,
  parameter int unsigned NSTAGE_MAX = 64
) (
  input  logic       ref_clk,
  input  logic [6:0] stages,
  input  logic [7:0] mult,
  output logic       sys_clk
);

  bit      restart;
  int      n;
  realtime half;

  always @(posedge ref_clk) restart = 1'b1;

  always_comb begin
    if (stages == 0)                    half = T_STAGE_PS / 2;
    else if (stages > 7'(NSTAGE_MAX))   half = real'(NSTAGE_MAX) * T_STAGE_PS / 2;
    else                                half = real'(stages) * T_STAGE_PS / 2;
  end

  initial begin
    sys_clk = 1'b0;
    restart = 1'b0;
    forever begin
      wait (restart);
      restart = 1'b0;
      n = 0;
      do begin
        sys_clk = 1'b1;
        #(half);
        sys_clk = 1'b0;
        #(half);
        n++;
      end while (!restart && (mult == 0 || n < int'(mult)));
    end
  end

endmodule
