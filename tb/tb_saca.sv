// Testbench for saca: with a 1.052MHz reference, checks the clock period
// (stages * 140ps) for several stage settings, that each reference edge
// restarts the clock with a rising edge (within one period when free-running), and that `mult` cycles are produced
// per reference period (8 as in the example waveform, and free-running when
// mult is 0).
`timescale 1ps/1fs
module tb_saca;
  localparam realtime TREF = 950_570.0;
  logic ref_clk = 1'b0, sys_clk;
  logic [6:0] stages = 7'd32;
  logic [7:0] mult = 8'd8;
  int checks = 0, failures = 0, nrise = 0;
  realtime t_prev = 0, t_ref = 0, per;
  bit first, settle;

  saca dut (.*);

  initial begin
    #900_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin
    ref_clk = 1'b1; #(TREF / 2);
    ref_clk = 1'b0; #(TREF / 2);
  end

  always @(posedge ref_clk) begin t_ref = $realtime; first = 1'b1; end
  always @(negedge ref_clk) settle = 1'b0;

  always @(posedge sys_clk) begin
    nrise++;
    if (first) begin
      first = 1'b0;
      if (!settle) checks++;
      if (!settle)
      if ($realtime - t_ref > (mult == 0 ? real'(stages) * 140.0 : 1.0)) begin failures++; $display("not aligned: %0f", $realtime - t_ref); end
    end else if (!settle) begin
      per = $realtime - t_prev;
      checks++;
      if (per - real'(stages) * 140.0 > 0.002 || real'(stages) * 140.0 - per > 0.002) begin
        failures++; $display("stages %0d: period %0f", stages, per);
      end
    end
    t_prev = $realtime;
  end

  task automatic count_per_ref(input int exp_n);
    @(posedge ref_clk); #1;
    nrise = 1;
    #(TREF - 2.0);
    checks++;
    if (nrise != exp_n) begin failures++; $display("stages %0d mult %0d: %0d cycles", stages, mult, nrise); end
  endtask

  initial begin
    repeat (2) @(posedge ref_clk);
    count_per_ref(8);
    stages = 7'd64; mult = 8'd0; settle = 1'b1; @(posedge ref_clk); count_per_ref(int'($ceil(TREF / (64 * 140.0))));
    stages = 7'd7;  mult = 8'd200; settle = 1'b1; @(posedge ref_clk); count_per_ref(200);
    stages = 7'd32; mult = 8'd0; settle = 1'b1; @(posedge ref_clk); count_per_ref(int'($ceil(TREF / (32 * 140.0))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
