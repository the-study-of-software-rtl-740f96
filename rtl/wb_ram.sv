// wb_ram: the platform's data memory, a WISHBONE slave of BYTES bytes
// (8MB by default, the memory address space of the platform).
//
// 32-bit words with byte selects. A request is answered with a registered ack
// one cycle after stb is seen, with the read data registered alongside it.
// The low address bits select the word; bits above the memory size are
// ignored (the interconnect has already decoded the region). The storage is
// a plain array, left to the synthesis tool to map onto a memory macro.
`timescale 1ps/1fs
module wb_ram #(
  parameter int unsigned BYTES = 8388608
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cyc,
  input  logic        stb,
  input  logic        we,
  input  logic [31:0] adr,
  input  logic [31:0] dat_w,
  input  logic [3:0]  sel,
  output logic        ack,
  output logic [31:0] dat_r
);

  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (cyc && stb && !ack) begin
      if (we) begin
        for (int b = 0; b < 4; b++)
          if (sel[b]) mem[widx][b*8 +: 8] <= dat_w[b*8 +: 8];
      end
      dat_r <= mem[widx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= 1'b0;
    else        ack <= cyc && stb && !ack;
  end

endmodule
