// Testbench for pfd: a 100MHz reference and a feedback clock whose rising
// edges sit a chosen offset o from the reference edges (o < 0: feedback
// early). For each offset, every comparison must report lead for o < 0 and
// lag for o > 0, toggle cmp_tgl, and produce a phase-error pulse |o| + 200ps
// wide. Comparisons in the first periods after o changes are not checked.
`timescale 1ps/1fs
module tb_pfd;
  localparam realtime T = 10_000.0;
  logic rst_n = 1'b0, ref_clk = 1'b0, fb_clk = 1'b0;
  logic lead, lag, cmp_tgl, phase_err;
  int checks = 0, failures = 0, ncmp = 0;
  realtime o = -1000.0, t_pe, t_set = 0;

  pfd dut (.*);

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin
    ref_clk = 1'b1; #(T / 2);
    ref_clk = 1'b0; #(T / 2);
  end

  // feedback: one rising edge per reference period, offset o from the next reference edge
  always begin
    @(posedge ref_clk);
    #(T + o);
    fb_clk = 1'b1;
    #(T / 8) fb_clk = 1'b0;
  end

  always @(posedge phase_err) t_pe = $realtime;
  always @(negedge phase_err) if (rst_n && $realtime - t_set > 2.5 * T) begin
    checks++;
    if ($realtime - t_pe - ((o < 0 ? -o : o) + 200.0) > 0.002 ||
        ((o < 0 ? -o : o) + 200.0) - ($realtime - t_pe) > 0.002) begin
      failures++; $display("o=%0f: pulse %0f", o, $realtime - t_pe);
    end
  end

  always @(cmp_tgl) if (rst_n && $realtime - t_set > 2.5 * T) begin
    ncmp++;
    checks++;
    if ((o < 0 && !(lead && !lag)) || (o > 0 && !(lag && !lead))) begin
      failures++; $display("o=%0f: lead=%b lag=%b", o, lead, lag);
    end
  end

  initial begin
    #(3 * T) rst_n = 1'b1;
    o = -4000.0; t_set = $realtime; #(12 * T);
    o = -1000.0; t_set = $realtime; #(12 * T);
    o = -45.0; t_set = $realtime;   #(12 * T);
    o = -0.09; t_set = $realtime;   #(12 * T);
    o = 0.09; t_set = $realtime;    #(12 * T);
    o = 30.0; t_set = $realtime;    #(12 * T);
    o = 777.0; t_set = $realtime;   #(12 * T);
    o = 4500.0; t_set = $realtime;  #(12 * T);
    checks++;
    if (ncmp < 40) begin failures++; $display("only %0d comparisons", ncmp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
