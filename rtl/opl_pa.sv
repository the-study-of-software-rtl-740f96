// opl_pa: behavioural model of the pulse amplifier with one-pulse lock that
// sits in front of the TDC.
//
// Pulse amplifier: the output rises with the input and falls T_PATH_PS
// (the delay path) after the input falls, so a pulse too narrow for the TDC
// becomes measurable and its width is the input width plus a known offset.
// One-pulse lock: while error_set is high the circuit is cleared (output
// low) and armed; after error_set falls, only the first input pulse is
// passed and every later one is blocked until error_set is raised again.
// The delay path length is this design's choice.
`timescale 1ps/1fs
module opl_pa #(
  parameter real T_PATH_PS = 300.0
) (
  input  logic in_pulse,
  input  logic error_set,
  output logic out_pulse
);

  bit armed, busy;

  initial begin
    armed = 1'b1; busy = 1'b0; out_pulse = 1'b0;   // powers up cleared
  end

  always @(posedge error_set) begin
    armed     = 1'b1;
    busy      = 1'b0;
    out_pulse = 1'b0;
  end

  always @(posedge in_pulse) if (armed && !error_set) begin
    armed     = 1'b0;
    busy      = 1'b1;
    out_pulse = 1'b1;
  end

  always @(negedge in_pulse) if (busy) begin
    busy = 1'b0;
    #(T_PATH_PS) out_pulse = 1'b0;
  end

endmodule
