// Testbench for coarse_delay_line: for random C1/C2 settings a slow square
// wave is applied and the delay of both edges is measured and compared with
// 700ps + C1*950ps + C2*20.32ps (to the 1fs time precision). It then checks
// the lap counter's one-pulse-at-a-time rule: an edge that arrives while a
// pulse is still in the line is not counted, so the divider output inverts.
`timescale 1ps/1fs
module tb_coarse_delay_line;
  logic in = 1'b0, out;
  logic [6:0] c1 = '0;
  logic [4:0] c2 = '0;
  int checks = 0, failures = 0;
  realtime t_in, exp_d;

  coarse_delay_line dut (.in(in), .c1(c1), .c2(c2), .out(out));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic edge_check(input logic v);
    #1000;
    t_in = $realtime;
    in = v;
    @(out);
    checks++;
    if ($realtime - t_in - exp_d > 0.002 || t_in + exp_d - $realtime > 0.002 || out !== v) begin
      failures++; $display("c1=%0d c2=%0d delay %0f expected %0f", c1, c2, $realtime - t_in, exp_d);
    end
  endtask

  initial begin
    #1000;
    for (int k = 0; k < 60; k++) begin
      c1 = (k == 0) ? 7'd0 : (k == 1) ? 7'd127 : 7'($urandom);
      c2 = (k == 0) ? 5'd0 : (k == 1) ? 5'd31  : 5'($urandom);
      exp_d = 700.0 + real'(c1) * 950.0 + real'(c2) * 20.32;
      edge_check(1'b1);
      edge_check(1'b0);
    end
    // counter busy: with c1=4 the line holds a pulse for 4.5ns
    c1 = 7'd4; c2 = 5'd0;
    #1000;
    in = 1'b1; #1000; in = 1'b0;      // second edge lands mid-count
    #3000;
    checks++; if (out !== 1'b0) begin failures++; $display("output moved before the delay"); end
    #1000;
    checks++; if (out !== 1'b1) begin failures++; $display("first edge not delivered"); end
    #9000;
    checks++; if (out !== 1'b1) begin failures++; $display("edge inside the count window was counted"); end
    in = 1'b1; #5000;                 // counted edge: divider now inverted
    checks++; if (out !== 1'b0) begin failures++; $display("divider did not toggle"); end
    in = 1'b0; #1000; in = 1'b1;      // another lost edge brings it back in step
    #10000;
    checks++; if (out !== 1'b1) begin failures++; $display("divider not back in step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
