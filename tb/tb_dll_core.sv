// Testbench for dll_core at a 10MHz reference: the TDC must measure the
// extended pulse as one reference period (plus the pulse amplifier's 300ps),
// the PFD must report lead / lag and the TDC the phase error when the
// delay line is set short / long of one period, only one pulse may be
// measured per arming, and the corrected phases must have a 50% duty cycle.
// Control words are worked out here from the delay line's step sizes.
`timescale 1ps/1fs
module tb_dll_core;
  localparam realtime T = 100_000.0;
  logic ref_clk = 1'b0, rst_n = 1'b0, mux_sel = 1'b0, error_set = 1'b1;
  logic [23:0] ctrl_filt = '0;
  logic lead, lag, cmp_tgl, tdc_done;
  logic [19:0] tdc_val;
  logic [7:0] p_raw, p_out;
  int checks = 0, failures = 0;
  realtime t_hi [8];

  dll_core dut (.*);

  initial begin
    #900_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin                       // 40% duty reference
    ref_clk = 1'b1; #(0.4 * T);
    ref_clk = 1'b0; #(0.6 * T);
  end

  // control word whose total delay (8 lines) is as close as possible below `total`
  function automatic logic [23:0] code_for(input realtime total);
    realtime d;
    int c1, c2, f1, f2, f3;
    d  = total / 8.0 - 775.0;
    c1 = int'($floor(d / 950.0));      d -= c1 * 950.0;
    c2 = int'($floor(d / 20.32));      d -= c2 * 20.32;
    f1 = int'($floor(d / 1.516));      d -= f1 * 1.516;
    f2 = int'($floor(d / 0.13322));    d -= f2 * 0.13322;
    f3 = int'($floor(d / 0.01153));
    if (f3 > 15) f3 = 15;
    return {7'(c1), 5'(c2), 4'(f1), 4'(f2), 4'(f3)};
  endfunction

  task automatic measure(input logic sel, output int v);
    mux_sel = sel;
    error_set = 1'b1; #(T / 3);
    error_set = 1'b0;
    wait (tdc_done);
    v = int'(tdc_val);
    #(3 * T);                         // later pulses must not disturb the result
    checks++;
    if (int'(tdc_val) != v) begin failures++; $display("one-pulse lock broken: %0d then %0d", v, tdc_val); end
  endtask

  task automatic expect_near(input int got, input int exp, input int tol, input string what);
    checks++;
    if (got > exp + tol || got < exp - tol) begin failures++; $display("%s: %0d expected %0d", what, got, exp); end
  endtask

  for (genvar i = 0; i < 8; i++) begin : g_duty
    always @(posedge p_out[i]) t_hi[i] = $realtime;
    always @(negedge p_out[i]) if ($realtime > 20 * T && ctrl_filt == code_for(T)) begin
      checks++;
      if ($realtime - t_hi[i] > T / 2 + 300.0 || $realtime - t_hi[i] < T / 2 - 300.0) begin
        failures++; $display("New P%0d high for %0f", i, $realtime - t_hi[i]);
      end
    end
  end

  int v;
  initial begin
    #(2 * T) rst_n = 1'b1;
    ctrl_filt = code_for(T);
    #(10 * T);
    measure(1'b0, v);
    expect_near(v, int'((T + 300.0) / 20.0), 1, "extended pulse");
    #(6 * T);                          // duty-cycle checks run meanwhile
    ctrl_filt = code_for(T - 1000.0);
    #(3 * T);
    measure(1'b1, v);
    checks++; if (!(lead && !lag)) begin failures++; $display("expected lead"); end
    expect_near(v, int'((1000.0 + 200.0 + 300.0) / 20.0), 2, "phase error (lead)");
    ctrl_filt = code_for(T + 600.0);
    #(3 * T);
    measure(1'b1, v);
    checks++; if (!(lag && !lead)) begin failures++; $display("expected lag"); end
    expect_near(v, int'((600.0 + 200.0 + 300.0) / 20.0), 2, "phase error (lag)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
