// sddll_pkg: types and constants shared by the SDDLL platform.
//
// The 24-bit digital control signal of the multiphase DCDL is split into a
// coarse part (C1 7 bits, C2 5 bits) and a fine part (F1, F2, F3, 4 bits each),
// laid out as C1[23:17] C2[16:12] F1[11:8] F2[7:4] F3[3:0]; this layout and the
// step sizes below are the document's. The bus address map and the DLL
// register map are this design's own choice.
`timescale 1ps/1fs
package sddll_pkg;

  localparam int CTRL_W = 24;

  typedef struct packed {
    logic [6:0] c1;   // coarse, 0.95ns per step
    logic [4:0] c2;   // coarse, 20.32ps per step
    logic [3:0] f1;   // fine, 1.516ps per step
    logic [3:0] f2;   // fine, 133.22fs per step
    logic [3:0] f3;   // fine, 11.53fs per step
  } dcdl_ctrl_t;

  // Nominal step sizes of one delay line, in ps.
  localparam real T_C1_PS = 950.0;
  localparam real T_C2_PS = 20.32;
  localparam real T_F1_PS = 1.516;
  localparam real T_F2_PS = 0.13322;
  localparam real T_F3_PS = 0.01153;

  // WISHBONE regions, selected by adr[31:28].
  localparam logic [3:0] REGION_FLASH = 4'h0;
  localparam logic [3:0] REGION_MEM   = 4'h1;
  localparam logic [3:0] REGION_DLL   = 4'h2;
  localparam int NSLV = 3;
  localparam int SLV_FLASH = 0;
  localparam int SLV_MEM   = 1;
  localparam int SLV_DLL   = 2;

  // DLL register offsets (byte addresses within the DLL region).
  localparam logic [7:0] REG_CTRL   = 8'h00;  // RW [23:0] digital control signal
  localparam logic [7:0] REG_CONFIG = 8'h04;  // RW [0] mux_sel [1] error_set [2] filt_en
  localparam logic [7:0] REG_STATUS = 8'h08;  // RO [0] lead [1] lag [15:8] comparisons [16] tdc_done
  localparam logic [7:0] REG_TDC    = 8'h0C;  // RO TDC output
  localparam logic [7:0] REG_FILT   = 8'h10;  // RO control word after the filter

endpackage
