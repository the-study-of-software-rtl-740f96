// Testbench for dcc_unit: the major clock has a 30% (then 70%) duty cycle and
// the minor clock is the major clock delayed by half a period. The corrected
// clock must rise with the major clock and stay high exactly half a period.
`timescale 1ps/1fs
module tb_dcc_unit;
  localparam realtime T = 8000.0;
  logic c1 = 1'b0, c2 = 1'b0, q;
  int checks = 0, failures = 0;
  real duty = 0.3;
  realtime t_c1, t_q;

  dcc_unit dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin
    c1 = 1'b1; #(T * duty);
    c1 = 1'b0; #(T * (1.0 - duty));
  end
  always begin
    #(T / 2);
    forever begin
      c2 = 1'b1; #(T * duty);
      c2 = 1'b0; #(T * (1.0 - duty));
    end
  end

  always @(posedge c1) t_c1 = $realtime;
  always @(posedge q) begin
    t_q = $realtime;
    if ($realtime > 3 * T) begin
      checks++;
      if (t_q - t_c1 > 60.0) begin failures++; $display("q rose %0f after c1", t_q - t_c1); end
    end
  end
  always @(negedge q) if ($realtime > 3 * T) begin
    checks++;
    if ($realtime - t_q - T / 2 > 0.002 || T / 2 - ($realtime - t_q) > 0.002) begin
      failures++; $display("high for %0f, expected %0f", $realtime - t_q, T / 2);
    end
  end

  initial begin
    #(20 * T) duty = 0.7;
    #(20 * T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
