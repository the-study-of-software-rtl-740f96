// Testbench for duty_cycle_corrector: eight phases 1/8 period apart with a
// 25% duty cycle (as from a locked delay line fed by a skewed clock) go in;
// every corrected output must rise with its own phase and stay high for
// exactly half a period.
`timescale 1ps/1fs
module tb_duty_cycle_corrector;
  localparam realtime T = 16000.0;
  logic [7:0] p = '0, p_new;
  int checks = 0, failures = 0;
  realtime t_p [8], t_q [8];

  duty_cycle_corrector dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < 8; i++) begin : g_ph
    always begin
      #(T * real'(i + 1) / 8.0);
      forever begin
        p[i] = 1'b1; #(T / 4);
        p[i] = 1'b0; #(3 * T / 4);
      end
    end
    always @(posedge p[i]) t_p[i] = $realtime;
    always @(posedge p_new[i]) begin
      t_q[i] = $realtime;
      if ($realtime > 3 * T) begin
        checks++;
        if (t_q[i] - t_p[i] > 60.0) begin failures++; $display("New P%0d late by %0f", i, t_q[i] - t_p[i]); end
      end
    end
    always @(negedge p_new[i]) if ($realtime > 3 * T) begin
      checks++;
      if ($realtime - t_q[i] - T / 2 > 0.002 || T / 2 - ($realtime - t_q[i]) > 0.002) begin
        failures++; $display("New P%0d high for %0f", i, $realtime - t_q[i]);
      end
    end
  end

  initial begin
    #(30 * T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
