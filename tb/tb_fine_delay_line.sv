// Testbench for fine_delay_line: for random F1/F2/F3 settings a slow square
// wave is applied and the delay of both edges is measured and compared with
// 75ps + F1*1.516ps + F2*133.22fs + F3*11.53fs (to the 1fs time precision).
`timescale 1ps/1fs
module tb_fine_delay_line;
  logic in = 1'b0, out;
  logic [3:0] f1 = '0, f2 = '0, f3 = '0;
  int checks = 0, failures = 0;
  realtime t_in, exp_d;

  fine_delay_line dut (.in(in), .f1(f1), .f2(f2), .f3(f3), .out(out));

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
      failures++; $display("f=%0d/%0d/%0d delay %0f expected %0f", f1, f2, f3, $realtime - t_in, exp_d);
    end
  endtask

  initial begin
    #1000;
    for (int k = 0; k < 60; k++) begin
      f1 = (k == 0) ? 4'd0 : (k == 1) ? 4'd15 : 4'($urandom);
      f2 = (k == 0) ? 4'd0 : (k == 1) ? 4'd15 : 4'($urandom);
      f3 = (k == 0) ? 4'd0 : (k == 1) ? 4'd15 : 4'($urandom);
      exp_d = 75.0 + real'(f1) * 1.516 + real'(f2) * 0.13322 + real'(f3) * 0.01153;
      edge_check(1'b1);
      edge_check(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
