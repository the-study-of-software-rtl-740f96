// ma_filter: 8-order moving-average filter on the DCDL digital control
// signal, used to soften the effect of jitter and noise on the loop.
//
// On each `sample` strobe (one per reference period in this platform) the
// input word enters an ORDER-deep history and the output becomes the mean of
// the history (running sum divided by ORDER, truncated). The 24-bit packed
// control word is averaged as one unsigned number. When `en` is low the
// filter is bypassed: the output follows the input combinationally and the
// history is refilled with the input, so enabling the filter starts from the
// current value instead of from old samples. ORDER must be a power of two.
`timescale 1ps/1fs
module ma_filter #(
  parameter int unsigned W     = 24,
  parameter int unsigned ORDER = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sample,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned LG = $clog2(ORDER);

  logic [W-1:0]    hist [ORDER];
  logic [W+LG-1:0] sum;
  logic [W-1:0]    avg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ORDER; i++) hist[i] <= '0;
      sum <= '0;
      avg <= '0;
    end else if (!en) begin
      for (int i = 0; i < ORDER; i++) hist[i] <= din;
      sum <= (W+LG)'(din) << LG;
      avg <= din;
    end else if (sample) begin
      hist[0] <= din;
      for (int i = 1; i < ORDER; i++) hist[i] <= hist[i-1];
      sum <= sum + (W+LG)'(din) - (W+LG)'(hist[ORDER-1]);
      avg <= W'((sum + (W+LG)'(din) - (W+LG)'(hist[ORDER-1])) >> LG);
    end
  end

  assign dout = en ? avg : din;

endmodule
