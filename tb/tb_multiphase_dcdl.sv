// Testbench for multiphase_dcdl: for random 24-bit control words a clock is
// applied and the rising edge of each tap Pi is timed; tap i must be
// (i+1) * (one line's delay) after the reference edge, where one line's delay
// is worked out here from the step sizes. Also checks the fields are taken
// from the right bits (single-field words). Last, the 100MHz pre-simulation
// case: a free-running 10ns clock with control word 0 and with C1 = 1. Every
// tap must show all 20 clock cycles, keep the 5ns high time, and its last
// rising edge must trail the last reference edge by (i+1) line delays.
`timescale 1ps/1fs
module tb_multiphase_dcdl;
  logic ref_clk = 1'b0;
  logic [23:0] ctrl = '0;
  logic [7:0] p;
  int checks = 0, failures = 0;
  realtime t_ref, line_d, t_tap [8], t_fall [8];
  int n_rise [8];

  multiphase_dcdl dut (.ref_clk(ref_clk), .ctrl(ctrl), .p(p));

  for (genvar i = 0; i < 8; i++) begin : g_t
    always @(posedge p[i]) begin t_tap[i] = $realtime; n_rise[i]++; end
    always @(negedge p[i]) t_fall[i] = $realtime;
  end

  initial begin
    #900_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic realtime one_line(input logic [23:0] c);
    return 775.0 + real'(c[23:17]) * 950.0 + real'(c[16:12]) * 20.32 + real'(c[11:8]) * 1.516
           + real'(c[7:4]) * 0.13322 + real'(c[3:0]) * 0.01153;
  endfunction

  task automatic run(input logic [23:0] c);
    ctrl = c;
    line_d = one_line(c);
    #2000 t_ref = $realtime;
    ref_clk = 1'b1;
    #(8.0 * line_d + 2000.0);      // high phase long enough for every tap
    ref_clk = 1'b0;
    #(8.0 * line_d + 2000.0);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (t_tap[i] - t_ref - real'(i + 1) * line_d > 0.02 ||
          t_ref + real'(i + 1) * line_d - t_tap[i] > 0.02) begin
        failures++;
        $display("ctrl=%h tap %0d at %0f expected %0f", c, i, t_tap[i] - t_ref, real'(i + 1) * line_d);
      end
    end
  endtask

  task automatic presim_100mhz(input logic [23:0] c);
    realtime t_last;
    ctrl = c;
    line_d = one_line(c);
    #20000;
    for (int i = 0; i < 8; i++) n_rise[i] = 0;
    repeat (20) begin
      t_last = $realtime;
      ref_clk = 1'b1; #5000;
      ref_clk = 1'b0; #5000;
    end
    #20000;
    for (int i = 0; i < 8; i++) begin
      checks += 3;
      if (n_rise[i] != 20) begin
        failures++; $display("100MHz ctrl=%h tap %0d saw %0d cycles", c, i, n_rise[i]);
      end
      if (t_fall[i] - t_tap[i] - 5000.0 > 0.02 || 5000.0 - (t_fall[i] - t_tap[i]) > 0.02) begin
        failures++; $display("100MHz ctrl=%h tap %0d high for %0f", c, i, t_fall[i] - t_tap[i]);
      end
      if (t_tap[i] - t_last - real'(i + 1) * line_d > 0.02 ||
          t_last + real'(i + 1) * line_d - t_tap[i] > 0.02) begin
        failures++; $display("100MHz ctrl=%h tap %0d at %0f expected %0f", c, i, t_tap[i] - t_last, real'(i + 1) * line_d);
      end
    end
  endtask

  initial begin
    run(24'h000000);
    run(24'hFE0000);   // C1 only
    run(24'h01F000);   // C2 only
    run(24'h000F00);   // F1 only
    run(24'h0000F0);   // F2 only
    run(24'h00000F);   // F3 only
    repeat (12) run(24'($urandom));
    presim_100mhz(24'h000000);      // control word zero
    presim_100mhz(24'h020000);      // C1 = 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
