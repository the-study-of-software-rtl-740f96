// End-to-end testbench for sddll_top at its default parameters. A
// behavioural CPU (sddll_cpu_model) runs the locking software over the
// WISHBONE bus and a behavioural ROM stands in for the program flash.
//
// Sequence: read the flash and use the data memory; lock at 1.052MHz from
// TDC mapping of the reference period; check the last phase lines up with
// the reference, the eight phases are 1/8 period apart and the corrected
// phases have a 50% duty cycle; stay locked while monitoring; let the
// reference drift by 430ps, which must be relocked by coarse sequential
// search; switch the
// reference to 1.25MHz, which must be detected and relocked through TDC
// mapping of the phase error; turn the moving-average filter on, switch back
// to 1.052MHz and relock through the filter. Each mechanism is counted and
// must occur at least once. Lock-in times are reported in reference cycles
// (the document reports about 48 and 52); each must stay under 120.
`timescale 1ps/1fs
module tb_sddll_top;
  import sddll_pkg::*;

  logic ref_clk = 1'b0, rst_n = 1'b0, sys_clk;
  logic [6:0] saca_stages = 7'd31;          // 31 * 140ps = 4.34ns, about 230MHz
  logic [7:0] saca_mult = 8'd0;
  logic m_cyc, m_stb, m_we, m_ack;
  logic [31:0] m_adr, m_dat_w, m_dat_r;
  logic [3:0] m_sel;
  logic fl_cyc, fl_stb, fl_we, fl_ack;
  logic [31:0] fl_adr, fl_dat_w, fl_dat_r;
  logic [3:0] fl_sel;
  logic [23:0] dcdl_ctrl;
  logic [7:0] p_raw, p_out;

  int checks = 0, failures = 0;
  realtime tref = 950_570.0;                // 1.052MHz
  longint nref = 0;

  sddll_top dut (.*);

  flash_model u_flash (.clk(sys_clk), .rst_n(rst_n), .cyc(fl_cyc), .stb(fl_stb), .we(fl_we),
                       .adr(fl_adr), .ack(fl_ack), .dat_r(fl_dat_r));

  sddll_cpu_model u_cpu (.clk(sys_clk), .rst_n(rst_n), .cyc(m_cyc), .stb(m_stb), .we(m_we),
                         .adr(m_adr), .dat_w(m_dat_w), .sel(m_sel), .ack(m_ack), .dat_r(m_dat_r));

  always begin
    ref_clk = 1'b1; #(0.45 * tref);
    ref_clk = 1'b0; #(0.55 * tref);
  end
  always @(posedge ref_clk) nref++;

  initial begin
    #4_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase of each tap relative to the last reference edge
  realtime t_ref, t_tap [8], t_hi [8], hi_w [8];
  always @(posedge ref_clk) t_ref = $realtime;
  for (genvar i = 0; i < 8; i++) begin : g_mon
    always @(posedge p_raw[i]) t_tap[i] = $realtime;
    always @(posedge p_out[i]) t_hi[i] = $realtime;
    always @(negedge p_out[i]) hi_w[i] = $realtime - t_hi[i];
  end

  // filter at work: the word reaching the delay line passes through values
  // that are neither the old nor the newly written control word
  int n_filter_steps = 0;
  always @(dut.u_dll.ctrl_filt) if (u_cpu.filt_on && dut.u_dll.ctrl_filt != dut.ctrl) n_filter_steps++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // lock quality, measured on the waveforms
  int n_phase_checks = 0, n_duty_checks = 0;
  task automatic check_locked_waveforms();
    realtime off, d;
    repeat (3) @(posedge ref_clk);
    #(tref / 2);
    off = t_tap[7] - t_ref;
    if (off > tref / 2) off -= tref;
    if (off < -tref / 2) off += tref;
    $display("  last phase vs reference: %0.3f ps", off);
    check(off < 1.0 && off > -1.0, "P7 not aligned with the reference");
    for (int i = 0; i < 7; i++) begin
      d = t_tap[i + 1] - t_tap[i];
      if (d < 0) d += tref;
      check(d - tref / 8 < 2.0 && tref / 8 - d < 2.0, $sformatf("P%0d->P%0d spacing %0f", i, i + 1, d));
      n_phase_checks++;
    end
    for (int i = 0; i < 8; i++) begin
      check(hi_w[i] - tref / 2 < 2.0 && tref / 2 - hi_w[i] < 2.0, $sformatf("New P%0d high %0f", i, hi_w[i]));
      n_duty_checks++;
    end
  endtask

  longint n0;
  int lock1, lock2, lock3, lock4;
  bit lost;
  logic [31:0] r;

  initial begin
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge ref_clk);

    // boot: program flash and data memory over the shared bus
    u_cpu.wb_read(32'h0000_0000, r); check(r == 32'hF1A5_0000, "flash word 0");
    u_cpu.wb_read(32'h0000_0014, r); check(r == 32'hF1A5_0005, "flash word 5");
    u_cpu.wb_write(32'h1000_0040, 32'hCAFE_0001);
    u_cpu.wb_write(32'h107F_FFFC, 32'h0BAD_F00D);   // last word of 8MB
    u_cpu.wb_read(32'h1000_0040, r); check(r == 32'hCAFE_0001, "memory word");
    u_cpu.wb_read(32'h107F_FFFC, r); check(r == 32'h0BAD_F00D, "memory top word");

    // 1. lock at 1.052MHz
    n0 = nref;
    u_cpu.acquire(1'b1);
    lock1 = int'(nref - n0);
    $display("locked at 1.052MHz after %0d reference cycles, code %h", lock1, dcdl_ctrl);
    check(lock1 < 120, "lock-in time at 1.052MHz");
    check_locked_waveforms();
    u_cpu.monitor(4, lost);
    check(!lost, "lock lost without cause");

    // 2. the reference drifts by 430ps: relock by coarse sequential search
    tref = 951_000.0;
    u_cpu.monitor(10, lost);
    check(lost, "drift not detected");
    n0 = nref;
    u_cpu.acquire(1'b0);
    lock4 = int'(nref - n0);
    $display("relocked after drift after %0d reference cycles, code %h", lock4, dcdl_ctrl);
    check(lock4 < 120, "lock-in time after drift");
    check_locked_waveforms();

    // 3. reference changes to 1.25MHz: detect, relock
    tref = 800_000.0;
    u_cpu.monitor(10, lost);
    check(lost, "frequency change not detected");
    n0 = nref;
    u_cpu.acquire(1'b0);
    lock2 = int'(nref - n0);
    $display("relocked at 1.25MHz after %0d reference cycles, code %h", lock2, dcdl_ctrl);
    check(lock2 < 120, "lock-in time at 1.25MHz");
    check_locked_waveforms();

    // 4. filter on, back to 1.052MHz
    u_cpu.set_filter(1'b1);
    tref = 950_570.0;
    u_cpu.monitor(10, lost);
    check(lost, "second frequency change not detected");
    n0 = nref;
    u_cpu.acquire(1'b0);
    lock3 = int'(nref - n0);
    $display("relocked through the filter after %0d reference cycles, code %h", lock3, dcdl_ctrl);
    check(lock3 < 240, "lock-in time with the filter");
    check(lock3 > 2 * lock1, "filter did not lengthen the lock-in time");
    check_locked_waveforms();

    // log lock times to memory and read them back
    u_cpu.wb_write(32'h1000_0100, 32'(lock1));
    u_cpu.wb_write(32'h1000_0104, 32'(lock2));
    u_cpu.wb_read(32'h1000_0100, r); check(r == 32'(lock1), "log word 0");
    u_cpu.wb_read(32'h1000_0104, r); check(r == 32'(lock2), "log word 1");

    // every mechanism must have happened
    $display("mechanisms: map_ref=%0d map_err=%0d seq_coarse=%0d prune=%0d seq_fine=%0d lock=%0d back_to_coarse=%0d bus=%0d phase=%0d duty=%0d filter_steps=%0d",
             u_cpu.n_map_ref, u_cpu.n_map_err, u_cpu.n_seq_coarse, u_cpu.n_prune, u_cpu.n_seq_fine,
             u_cpu.n_lock, u_cpu.n_back_to_coarse, u_cpu.n_bus, n_phase_checks, n_duty_checks, n_filter_steps);
    check(u_cpu.n_map_ref > 0, "TDC mapping of the reference never ran");
    check(u_cpu.n_map_err > 0, "TDC mapping of the phase error never ran");
    check(u_cpu.n_seq_coarse > 0, "coarse sequential search never ran");
    check(u_cpu.n_prune > 0, "prune-and-search never ran");
    check(u_cpu.n_seq_fine > 0, "fine sequential search never ran");
    check(u_cpu.n_lock >= 3, "not every lock reached");
    check(u_cpu.n_back_to_coarse >= 2, "return to coarse tune never happened");
    check(n_filter_steps > 0, "the delay line never saw a filtered control word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
