// wb_shared_bus: WISHBONE shared-bus interconnect with one master and NSLV
// address-decoded slaves (flash, data memory and the DLL on this platform).
//
// The master's request is registered for one cycle before it reaches the
// addressed slave; the slaves answer with a registered ack, so a single access
// takes three system cycles from the edge where the master raises stb to the
// edge where it sees ack, the figure the document gives for one bus access.
// The address map (adr[31:28]: 0 flash, 1 memory, 2 DLL) is this design's
// choice. An access to an unmapped region is answered by the bus itself with
// read data 0, so the master can never hang. Only the classic single
// read/write cycle is supported; the master must drop stb for at least one
// cycle between accesses (back-to-back requests are not pipelined).
`timescale 1ps/1fs
module wb_shared_bus
  import sddll_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // master side
  input  logic                 m_cyc,
  input  logic                 m_stb,
  input  logic                 m_we,
  input  logic [31:0]          m_adr,
  input  logic [31:0]          m_dat_w,
  input  logic [3:0]           m_sel,
  output logic                 m_ack,
  output logic [31:0]          m_dat_r,
  // slave side
  output logic [NSLV-1:0]      s_cyc,
  output logic [NSLV-1:0]      s_stb,
  output logic                 s_we,
  output logic [31:0]          s_adr,
  output logic [31:0]          s_dat_w,
  output logic [3:0]           s_sel,
  input  logic [NSLV-1:0]      s_ack,
  input  logic [NSLV*32-1:0]   s_dat_r
);

  typedef enum logic [1:0] {IDLE, REQ, DONE} bus_state_t;
  bus_state_t state;
  logic [NSLV-1:0] grant;     // one-hot slave select of the access in flight
  logic            unmapped_ack;

  function automatic logic [NSLV-1:0] decode(input logic [31:0] adr);
    logic [NSLV-1:0] g;
    g = '0;
    unique case (adr[31:28])
      REGION_FLASH: g[SLV_FLASH] = 1'b1;
      REGION_MEM:   g[SLV_MEM]   = 1'b1;
      REGION_DLL:   g[SLV_DLL]   = 1'b1;
      default:      g = '0;
    endcase
    return g;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      grant        <= '0;
      s_we         <= 1'b0;
      s_adr        <= '0;
      s_dat_w      <= '0;
      s_sel        <= '0;
      unmapped_ack <= 1'b0;
    end else begin
      unmapped_ack <= 1'b0;
      unique case (state)
        IDLE: if (m_cyc && m_stb) begin
          grant   <= decode(m_adr);
          s_we    <= m_we;
          s_adr   <= m_adr;
          s_dat_w <= m_dat_w;
          s_sel   <= m_sel;
          state   <= REQ;
        end
        REQ: begin
          if (grant == '0) begin
            unmapped_ack <= 1'b1;
            state        <= DONE;
          end else if (|(s_ack & grant)) begin
            grant <= '0;
            state <= DONE;
          end
          if (!m_cyc) begin           // master abandoned the cycle
            grant <= '0;
            state <= IDLE;
          end
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign s_cyc = (state == REQ) ? grant : '0;
  assign s_stb = s_cyc;

  always_comb begin
    m_ack   = unmapped_ack;
    m_dat_r = '0;
    for (int i = 0; i < NSLV; i++) begin
      if (state == REQ && grant[i] && s_ack[i]) begin
        m_ack   = 1'b1;
        m_dat_r = s_dat_r[i*32 +: 32];
      end
    end
  end

  // A slave may only acknowledge the access addressed to it.
  a_ack_granted: assert property (@(posedge clk) disable iff (!rst_n)
                                  (s_ack & ~s_cyc) == '0);

endmodule
