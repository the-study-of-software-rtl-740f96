// multiphase_dcdl: behavioural model of the 8-stage multiphase
// digitally-controlled delay line.
//
// Eight identical delay lines in series, each a coarse line followed by a fine
// line, all steered by the same 24-bit control word (C1[23:17] C2[16:12]
// F1[11:8] F2[7:4] F3[3:0]). Tap p[i] is the output of line i, so when the
// loop is locked the total delay is one reference period, p[7] lines up with
// the reference clock and neighbouring taps are 1/8 period apart. With the
// default step sizes one line spans 0.775ns..121.4ns, the whole line
// 6.2ns..971ns; one F3 step moves the last tap by about 90fs.
`timescale 1ps/1fs
module multiphase_dcdl
  import sddll_pkg::*;
#(
  parameter int unsigned NSTAGE = 8
) (
  input  logic              ref_clk,
  input  logic [CTRL_W-1:0] ctrl,
  output logic [NSTAGE-1:0] p
);

  dcdl_ctrl_t c;
  assign c = dcdl_ctrl_t'(ctrl);

  logic [NSTAGE:0] chain;
  logic [NSTAGE-1:0] mid;
  assign chain[0] = ref_clk;

  for (genvar i = 0; i < NSTAGE; i++) begin : g_line
    coarse_delay_line u_coarse (.in(chain[i]), .c1(c.c1), .c2(c.c2), .out(mid[i]));
    fine_delay_line   u_fine   (.in(mid[i]), .f1(c.f1), .f2(c.f2), .f3(c.f3), .out(chain[i+1]));
  end

  assign p = chain[NSTAGE:1];

endmodule
