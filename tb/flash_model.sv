// flash_model: behavioural stand-in for the external program flash, a
// read-only WISHBONE slave. Word i reads as 32'hF1A5_0000 + i; writes are
// acknowledged and ignored. Ack is registered, one cycle after stb.
`timescale 1ps/1fs
module flash_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cyc,
  input  logic        stb,
  input  logic        we,
  input  logic [31:0] adr,
  output logic        ack,
  output logic [31:0] dat_r
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack   <= 1'b0;
      dat_r <= '0;
    end else begin
      ack <= cyc && stb && !ack;
      if (cyc && stb && !ack && !we) dat_r <= 32'hF1A5_0000 + {10'd0, adr[23:2]};
    end
  end
endmodule
