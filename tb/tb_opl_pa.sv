// Testbench for opl_pa: narrow and wide pulses of known width are applied.
// After error_set is released only the first pulse may come through,
// widened by the 300ps delay path; later pulses must be blocked until
// error_set is raised and released again, and nothing passes while
// error_set is high.
`timescale 1ps/1fs
module tb_opl_pa;
  logic in_pulse = 1'b0, error_set = 1'b1, out_pulse;
  int checks = 0, failures = 0, nout = 0;
  realtime t_rise, w_out;

  opl_pa dut (.*);

  always @(posedge out_pulse) begin t_rise = $realtime; nout++; end
  always @(negedge out_pulse) w_out = $realtime - t_rise;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input realtime w);
    in_pulse = 1'b1; #(w);
    in_pulse = 1'b0; #5000;
  endtask

  realtime w;
  int n0;
  initial begin
    #1000;
    repeat (30) begin
      w = real'($urandom_range(5, 20000)) / 4.0;
      error_set = 1'b1; #500;
      n0 = nout;
      pulse(w);                         // blocked: error_set high
      checks++; if (nout != n0) begin failures++; $display("pulse passed while error_set high"); end
      error_set = 1'b0; #500;
      pulse(w);                         // first pulse passes
      checks++;
      if (nout != n0 + 1 || w_out - (w + 300.0) > 0.002 || (w + 300.0) - w_out > 0.002) begin
        failures++; $display("in %0f out %0f (count %0d)", w, w_out, nout - n0);
      end
      pulse(w); pulse(w / 2 + 1.0);     // one-pulse lock
      checks++; if (nout != n0 + 1) begin failures++; $display("second pulse passed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
