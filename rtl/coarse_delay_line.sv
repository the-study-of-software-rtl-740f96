// coarse_delay_line: behavioural model of the coarse part of one DCDL stage.
// It is an analog timing block (gate chains, a counter-based C1 section and a
// selectable-path C2 section), not synthesizable logic.
//
// It follows the structure the document describes. Every input edge, rising
// or falling, becomes one narrow pulse. In the C1 section the pulse
// circulates through a 0.95ns delay cell while a counter counts laps; when
// the count reaches c1 the counter releases the pulse and resets. The pulse
// then takes the C2 path of c2 * 20.32ps plus the intrinsic delay. A
// frequency divider (a toggle) at the end turns the pulses back into a clock.
// The output therefore repeats the input delayed by
//   T_INT + c1 * 0.95ns + c2 * 20.32ps
// with c1 and c2 taken at the input edge. Step sizes follow the document;
// the intrinsic-delay split is this design's choice.
//
// Timing limit: the counter handles one pulse at a time. An input edge that
// arrives while a pulse is still in the line is not counted, and the divider
// output then runs inverted. Input half periods must be longer than the
// delay, as in the real line. The output starts low, so the input must too.
`timescale 1ps/1fs
module coarse_delay_line #(
  parameter real T_C1_PS  = 950.0,
  parameter real T_C2_PS  = 20.32,
  parameter real T_INT_PS = 700.0
) (
  input  logic       in,
  input  logic [6:0] c1,
  input  logic [4:0] c2,
  output logic       out
);

  logic [6:0] laps;      // the C1 lap counter
  logic [6:0] c1_s;      // settings held for the pulse in flight
  logic [4:0] c2_s;

  initial begin
    out = 1'b0; laps = '0;
  end

  always begin
    @(in);                             // edge detector: one narrow pulse
    c1_s = c1;
    c2_s = c2;
    laps = '0;
    while (laps != c1_s) begin         // C1: count laps of the loop
      #(T_C1_PS);
      laps = laps + 7'd1;
    end
    laps = '0;                         // counter reset after release
    #(T_INT_PS + real'(c2_s) * T_C2_PS);   // C2 path and intrinsic delay
    out = ~out;                        // frequency divider restores the clock
  end

endmodule
