// Testbench for wb_shared_bus: three slave models (registered ack, each
// answering reads with a tag of its own and storing writes) sit behind the
// bus. Random accesses to all regions, including an unmapped one, check the
// routing, the data in both directions, that only the addressed slave sees
// the request, and the three-cycle access time.
`timescale 1ps/1fs
module tb_wb_shared_bus;
  import sddll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic m_cyc = 1'b0, m_stb = 1'b0, m_we = 1'b0, m_ack;
  logic [31:0] m_adr = '0, m_dat_w = '0, m_dat_r;
  logic [3:0] m_sel = '0;
  logic [NSLV-1:0] s_cyc, s_stb, s_ack;
  logic s_we;
  logic [31:0] s_adr, s_dat_w;
  logic [3:0] s_sel;
  logic [NSLV*32-1:0] s_dat_r;
  logic [31:0] last_w [NSLV];
  int checks = 0, failures = 0;

  wb_shared_bus dut (.*);

  always #5 clk = ~clk;

  // slave models
  for (genvar i = 0; i < NSLV; i++) begin : g_slv
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_ack[i] <= 1'b0;
        s_dat_r[i*32 +: 32] <= '0;
        last_w[i] <= '0;
      end else begin
        s_ack[i] <= s_cyc[i] && s_stb[i] && !s_ack[i];
        if (s_cyc[i] && s_stb[i] && !s_ack[i]) begin
          if (s_we) last_w[i] <= s_dat_w;
          s_dat_r[i*32 +: 32] <= {4'(i), s_adr[27:0]} ^ 32'h5A5A_0000;
        end
      end
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // only one slave may ever see a request
  always @(posedge clk) if (rst_n) begin
    checks++;
    if ($countones(s_cyc) > 1) begin failures++; $display("several slaves selected"); end
  end

  int n;
  logic [31:0] a, d;
  int region, slv;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      region = $urandom_range(0, 3);
      a = {4'(region), 28'($urandom) & 28'hFFFFFFC};
      d = $urandom;
      slv = region;   // regions 0..2 map to slaves 0..2, region 3 is unmapped
      @(negedge clk);
      m_cyc = 1'b1; m_stb = 1'b1; m_we = $urandom_range(0, 1); m_adr = a; m_dat_w = d; m_sel = 4'hF;
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!m_ack && n < 20);
      // ack is visible after n edges and the master samples it at the next
      // one: counted from the edge that starts the request, n + 1 cycles.
      checks++;
      if (n + 1 != 3) begin failures++; $display("access took %0d cycles", n + 1); end
      checks++;
      if (!m_we) begin
        if (slv < NSLV && m_dat_r !== ({4'(slv), a[27:0]} ^ 32'h5A5A_0000)) begin
          failures++; $display("read %h from region %0d got %h", a, region, m_dat_r);
        end else if (slv >= NSLV && m_dat_r !== 32'd0) begin
          failures++; $display("unmapped read returned %h", m_dat_r);
        end
      end else if (slv < NSLV) begin
        @(posedge clk); #1;
        if (last_w[slv] !== d) begin failures++; $display("write to slave %0d lost", slv); end
      end
      @(negedge clk) begin m_cyc = 1'b0; m_stb = 1'b0; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
