// Testbench for clock_extender: after reset the extended pulse must toggle on
// every reference rising edge, so it is high for exactly one reference period
// and low for the next.
`timescale 1ps/1fs
module tb_clock_extender;
  logic ref_clk = 1'b0, rst_n = 1'b0, ext_pulse;
  int checks = 0, failures = 0;
  bit expected = 1'b0;
  realtime t_rise;

  clock_extender dut (.ref_clk(ref_clk), .rst_n(rst_n), .ext_pulse(ext_pulse));

  always #500 ref_clk = ~ref_clk;   // 1ns period

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2300 rst_n = 1'b1;
    checks++; if (ext_pulse !== 1'b0) begin failures++; $display("not reset"); end
    repeat (40) begin
      @(posedge ref_clk); #10;
      expected = ~expected;
      checks++;
      if (ext_pulse !== expected) begin failures++; $display("ext_pulse=%b expected %b", ext_pulse, expected); end
    end
    // pulse width equals one reference period
    @(posedge ext_pulse); t_rise = $realtime;
    @(negedge ext_pulse);
    checks++;
    if ($realtime - t_rise != 1000.0) begin failures++; $display("width %0t", $realtime - t_rise); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
