// fine_delay_line: behavioural model of the fine part of one DCDL stage: three
// cascaded variable-capacitance lines (F1, F2, F3) whose switched parallel
// gate loads slow a driving inverter. Analog by nature, so not synthesizable.
//
// The output repeats the input delayed by
//   T_INT + f1 * 1.516ps + f2 * 133.22fs + f3 * 11.53fs
// (step sizes from the document; the intrinsic delay is this design's
// choice). Time precision is 1fs, so an F3 step rounds to 12fs. The delay is
// taken from the control inputs at each input edge.
`timescale 1ps/1fs
module fine_delay_line #(
  parameter real T_F1_PS  = 1.516,
  parameter real T_F2_PS  = 0.13322,
  parameter real T_F3_PS  = 0.01153,
  parameter real T_INT_PS = 75.0
) (
  input  logic       in,
  input  logic [3:0] f1,
  input  logic [3:0] f2,
  input  logic [3:0] f3,
  output logic       out
);

  realtime d;

  always_comb d = T_INT_PS + real'(f1) * T_F1_PS + real'(f2) * T_F2_PS + real'(f3) * T_F3_PS;

  initial out = 1'b0;
  always @(in) out <= #(d) in;

endmodule
