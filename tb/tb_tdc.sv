// Testbench for tdc: pulses of random known width (up to a reference period
// of 0.517MHz) are applied; the output must equal floor(width / 20ps) within
// one count (an edge landing on a cell boundary), done must rise after the
// pulse and fall on clr and at the next pulse.
`timescale 1ps/1fs
module tb_tdc;
  logic in_pulse = 1'b0, clr = 1'b0, done;
  logic [19:0] value;
  int checks = 0, failures = 0;

  tdc dut (.*);

  initial begin
    #900_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime w;
  longint exp_v;
  initial begin
    #1000;
    for (int k = 0; k < 40; k++) begin
      w = (k == 0) ? 1_934_236.0 : (k == 1) ? 10.0 : real'($urandom_range(30, 2_000_000)) + 0.37;
      exp_v = longint'($floor(w / 20.0));
      in_pulse = 1'b1; #5;
      checks++; if (done) begin failures++; $display("done stayed high"); end
      #(w - 5.0) in_pulse = 1'b0;
      #100;
      checks++;
      if (!done || longint'(value) > exp_v + 1 || longint'(value) + 1 < exp_v) begin
        failures++; $display("width %0f: value %0d expected %0d done %b", w, value, exp_v, done);
      end
      if (k % 4 == 0) begin
        clr = 1'b1; #10;
        checks++; if (done) begin failures++; $display("clr did not clear done"); end
        clr = 1'b0;
      end
      #1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
