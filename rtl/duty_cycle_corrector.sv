// duty_cycle_corrector: eight duty-cycle-corrector units, one per DCDL
// phase. Unit i takes phase i as its major clock and phase (i+4) mod 8, half a
// reference period later when locked, as its minor clock, and produces the
// corrected phase New Pi with a 50% duty cycle and the rising edge of Pi.
// Built from behavioural units, so it is a behavioural model as a whole.
`timescale 1ps/1fs
module duty_cycle_corrector #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] p,
  output logic [N-1:0] p_new
);

  for (genvar i = 0; i < N; i++) begin : g_unit
    dcc_unit u_dcc (.c1(p[i]), .c2(p[(i + N/2) % N]), .q(p_new[i]));
  end

endmodule
