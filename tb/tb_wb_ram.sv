// Testbench for wb_ram (reduced to 4KB): random single WISHBONE reads and
// writes with random byte selects, checked against a model array; each
// access must be acknowledged exactly one cycle after stb is seen.
`timescale 1ps/1fs
module tb_wb_ram;
  localparam int BYTES = 4096;
  logic clk = 1'b0, rst_n = 1'b0, cyc = 1'b0, stb = 1'b0, we = 1'b0, ack;
  logic [31:0] adr = '0, dat_w = '0, dat_r;
  logic [3:0] sel = '0;
  logic [31:0] model [BYTES/4];
  int checks = 0, failures = 0;

  wb_ram #(.BYTES(BYTES)) dut (.clk(clk), .rst_n(rst_n), .cyc(cyc), .stb(stb), .we(we), .adr(adr),
                               .dat_w(dat_w), .sel(sel), .ack(ack), .dat_r(dat_r));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit w, input int idx, input logic [31:0] d, input logic [3:0] s,
                        output logic [31:0] r);
    int n = 0;
    @(negedge clk);
    cyc = 1'b1; stb = 1'b1; we = w; adr = 32'(idx * 4) | 32'h1000_0000; dat_w = d; sel = s;
    do begin @(posedge clk); #1; n++; end while (!ack);
    r = dat_r;
    checks++;
    if (n != 1) begin failures++; $display("ack after %0d edges", n); end
    @(negedge clk) begin cyc = 1'b0; stb = 1'b0; end
  endtask

  logic [31:0] r, d;
  int idx;
  logic [3:0] s;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      d = $urandom; access(1'b1, i, d, 4'hF, r); model[i] = d;
    end
    repeat (400) begin
      idx = $urandom_range(0, 63);
      if ($urandom_range(0, 1)) begin
        d = $urandom; s = 4'($urandom);
        access(1'b1, idx, d, s, r);
        for (int b = 0; b < 4; b++) if (s[b]) model[idx][b*8 +: 8] = d[b*8 +: 8];
      end else begin
        access(1'b0, idx, 32'd0, 4'hF, r);
        checks++;
        if (r !== model[idx]) begin failures++; $display("read %0d: %h expected %h", idx, r, model[idx]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
