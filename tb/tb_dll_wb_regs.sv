// Testbench for dll_wb_regs: register writes and read-back, reset values,
// the comparison counter and lead/lag capture on each toggle of cmp_tgl,
// TDC value capture behind tdc_done, and one ref_tick per reference edge.
`timescale 1ps/1fs
module tb_dll_wb_regs;
  import sddll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, cyc = 1'b0, stb = 1'b0, we = 1'b0, ack;
  logic [31:0] adr = '0, dat_w = '0, dat_r;
  logic [3:0] sel = 4'hF;
  logic [23:0] ctrl, ctrl_filt;
  logic mux_sel, error_set, filt_en, ref_tick;
  logic ref_clk = 1'b0, lead = 1'b0, lag = 1'b0, cmp_tgl = 1'b0, tdc_done = 1'b0;
  logic [19:0] tdc_val = '0;
  int checks = 0, failures = 0, ticks = 0, ref_edges = 0;

  dll_wb_regs dut (.*);

  assign ctrl_filt = ~ctrl;

  always #5 clk = ~clk;
  always #437 ref_clk = ~ref_clk;
  always @(posedge clk) if (ref_tick) ticks++;
  always @(posedge ref_clk) if (rst_n) ref_edges++;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus(input bit w, input logic [7:0] off, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    cyc = 1'b1; stb = 1'b1; we = w; adr = 32'h2000_0000 | 32'(off); dat_w = d;
    do @(posedge clk); while (!ack);
    #1 r = dat_r;
    @(negedge clk) begin cyc = 1'b0; stb = 1'b0; end
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  logic [31:0] r, v;
  int cnt0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    bus(0, REG_CTRL, 0, r);   expect_eq(r, 0, "reset ctrl");
    bus(0, REG_CONFIG, 0, r); expect_eq(r, 32'h2, "reset config");
    repeat (20) begin
      v = 32'($urandom) & 32'hFF_FFFF;
      bus(1, REG_CTRL, v, r);
      bus(0, REG_CTRL, 0, r); expect_eq(r, v, "ctrl readback");
      expect_eq(32'(ctrl), v, "ctrl port");
      bus(0, REG_FILT, 0, r); expect_eq(r, {8'd0, ~v[23:0]}, "filtered readback");
      v = 32'($urandom_range(0, 7));
      bus(1, REG_CONFIG, v, r);
      expect_eq(32'({filt_en, error_set, mux_sel}), v, "config port");
    end
    // phase comparisons
    bus(0, REG_STATUS, 0, r); cnt0 = int'(r[15:8]);
    for (int k = 1; k <= 10; k++) begin
      lead = k[0]; lag = ~k[0];
      #3 cmp_tgl = ~cmp_tgl;
      repeat (5) @(posedge clk);
      bus(0, REG_STATUS, 0, r);
      expect_eq(32'(r[15:8]), 32'((cnt0 + k) % 256), "comparison count");
      expect_eq(32'(r[1:0]), 32'({~k[0], k[0]}), "lead/lag");
    end
    // TDC
    tdc_val = 20'h12345; #7 tdc_done = 1'b1;
    repeat (5) @(posedge clk);
    bus(0, REG_STATUS, 0, r); expect_eq(32'(r[16]), 1, "tdc_done");
    bus(0, REG_TDC, 0, r);    expect_eq(r, 32'h12345, "tdc value");
    tdc_done = 1'b0;
    repeat (5) @(posedge clk);
    bus(0, REG_STATUS, 0, r); expect_eq(32'(r[16]), 0, "tdc_done cleared");
    // ref ticks: one per reference edge (allow the edge in flight)
    checks++;
    if (ticks < ref_edges - 1 || ticks > ref_edges) begin
      failures++; $display("ticks %0d for %0d reference edges", ticks, ref_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
