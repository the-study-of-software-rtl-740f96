// tdc: behavioural model of the time-to-digital converter. A chain of NSTAGE
// delay cells of T_STAGE_PS each is closed into a loop while the input pulse
// is high; a cascaded counter counts the laps and flip-flops on the cell
// outputs record how far the edge travelled when the pulse falls.
//
// value = laps * NSTAGE + cells passed = floor(pulse width / T_STAGE_PS),
// valid when done is high. done falls when a new pulse starts or while clr
// is high (the one-pulse lock is re-armed at the same time). NSTAGE must be
// a power of two. Resolution 20ps is the document's; the cell count and the
// output width are this design's choice (20 bits cover 20.9us).
`timescale 1ps/1fs
module tdc #(
  parameter real         T_STAGE_PS = 20.0,
  parameter int unsigned NSTAGE     = 64,
  parameter int unsigned W          = 20
) (
  input  logic         in_pulse,
  input  logic         clr,
  output logic [W-1:0] value,
  output logic         done
);

  localparam int unsigned PW = $clog2(NSTAGE);

  logic [PW-1:0]   pos;    // cell the edge has reached in the current lap
  logic [W-PW-1:0] laps;   // cascaded lap counter

  initial begin
    value = '0; done = 1'b0; pos = '0; laps = '0;
  end

  always @(posedge clr) done = 1'b0;

  always begin
    @(posedge in_pulse);
    done = 1'b0;
    pos  = '0;
    laps = '0;
    while (in_pulse) begin
      #(T_STAGE_PS);
      if (in_pulse) begin
        if (pos == PW'(NSTAGE - 1)) begin
          pos  = '0;
          laps = laps + 1'b1;
        end else begin
          pos = pos + 1'b1;
        end
      end
    end
    value = {laps, pos};
    done  = !clr;
  end

endmodule
