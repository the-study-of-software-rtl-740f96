// Testbench for ma_filter: random control words are sampled at random
// moments; the output is compared with the mean of the last eight samples
// computed here from a queue. Also checks bypass while disabled and that
// enabling starts from the current input value.
`timescale 1ps/1fs
module tb_ma_filter;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, sample = 1'b0;
  logic [23:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [23:0] q[$];
  longint sum;

  ma_filter dut (.clk(clk), .rst_n(rst_n), .en(en), .sample(sample), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [23:0] exp, input string what);
    checks++;
    if (dout !== exp) begin failures++; $display("%s: dout=%h expected %h", what, dout, exp); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // bypass
    repeat (20) begin
      @(negedge clk) din = 24'($urandom);
      #1 check(din, "bypass");
    end
    // enable: history starts full of the current value
    @(negedge clk) din = 24'h123456;
    @(negedge clk) en = 1'b1;
    q.delete(); repeat (8) q.push_back(24'h123456);
    #1 check(24'h123456, "enable");
    repeat (200) begin
      @(negedge clk);
      din    = 24'($urandom);
      sample = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      if (sample) begin
        q.push_back(din); void'(q.pop_front());
      end
      sample = 1'b0;
      sum = 0; foreach (q[i]) sum += q[i];
      check(24'(sum / 8), "average");
    end
    // constant input settles in exactly eight samples
    din = 24'hABCDEF;
    repeat (8) begin @(negedge clk) sample = 1'b1; end
    @(negedge clk) sample = 1'b0;
    check(24'hABCDEF, "settled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
