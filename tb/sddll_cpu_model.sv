// sddll_cpu_model: behavioural stand-in for the platform's CPU. It is a
// WISHBONE master whose tasks play the locking software:
//   1. TDC mapping of the reference period: the extended pulse is measured
//      and the delay line set, by the nominal (linear) step sizes, to one
//      period.
//   2. Coarse tune: the phase error is measured with the TDC. Below 10 counts
//      the loop goes to the fine tune; above 60 counts the error itself is
//      mapped onto the control word; otherwise the coarse part (C1|C2) moves
//      one step toward lock (sequential search).
//   3. Fine tune: prune-and-search (successive approximation, one bit per
//      tune, from the phase state only) over the 12-bit fine part, started
//      just below the target (coarse part from the last measured error, fine
//      part cleared), then
//      sequential search one F3 step at a time until the phase state has
//      alternated lead/lag/lead/lag: locked, and tuning stops.
//   4. While locked, the phase error is re-measured every few periods and
//      a large error sends the loop back to the coarse tune.
// Each tune waits for a fresh phase comparison taken with the new control
// word (about two reference periods per tune). With the filter on, it also
// waits until the filtered word has reached the written one. Counters
// record how often each mechanism ran.
`timescale 1ps/1fs
module sddll_cpu_model
  import sddll_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic        cyc,
  output logic        stb,
  output logic        we,
  output logic [31:0] adr,
  output logic [31:0] dat_w,
  output logic [3:0]  sel,
  input  logic        ack,
  input  logic [31:0] dat_r
);

  localparam logic [31:0] DLL = 32'h2000_0000;
  localparam int OFF_EXT = 15;       // pulse amplifier: 300ps = 15 TDC counts
  localparam int OFF_ERR = 25;       // + PFD minimum error pulse 200ps
  localparam int TH_FINE = 10;
  localparam int TH_MAP  = 60;

  // mechanism counters
  int n_map_ref = 0, n_map_err = 0, n_seq_coarse = 0, n_prune = 0, n_seq_fine = 0;
  int n_lock = 0, n_back_to_coarse = 0, n_bus = 0;
  bit locked = 1'b0, filt_on = 1'b0;
  logic [23:0] code = '0;
  int last_err = 0;

  initial begin
    cyc = 1'b0; stb = 1'b0; we = 1'b0; adr = '0; dat_w = '0; sel = 4'hF;
  end

  task automatic wb_write(input logic [31:0] a, input logic [31:0] d);
    @(posedge clk);
    cyc <= 1'b1; stb <= 1'b1; we <= 1'b1; adr <= a; dat_w <= d; sel <= 4'hF;
    do @(posedge clk); while (!ack);
    cyc <= 1'b0; stb <= 1'b0; we <= 1'b0;
    n_bus++;
  endtask

  task automatic wb_read(input logic [31:0] a, output logic [31:0] d);
    @(posedge clk);
    cyc <= 1'b1; stb <= 1'b1; we <= 1'b0; adr <= a; sel <= 4'hF;
    do @(posedge clk); while (!ack);
    d = dat_r;
    cyc <= 1'b0; stb <= 1'b0;
    n_bus++;
  endtask

  // --- delay-line arithmetic in femtoseconds, nominal linear model ---------
  function automatic longint line_fs(input logic [23:0] c);
    return 64'd775000 + 64'(c[23:17]) * 950000 + 64'(c[16:12]) * 20320 + 64'(c[11:8]) * 1516
           + 64'(c[7:4]) * 133 + 64'(c[3:0]) * 12;
  endfunction

  function automatic logic [23:0] code_for_line(input longint fs);
    longint d, c1, c2, f1, f2, f3;
    d = fs - 775000;
    if (d < 0) d = 0;
    c1 = d / 950000; if (c1 > 127) c1 = 127; d -= c1 * 950000;
    c2 = d / 20320;  if (c2 > 31) c2 = 31;   d -= c2 * 20320;
    f1 = d / 1516;   if (f1 > 15) f1 = 15;   d -= f1 * 1516;
    f2 = d / 133;    if (f2 > 15) f2 = 15;   d -= f2 * 133;
    f3 = d / 12;     if (f3 > 15) f3 = 15;
    return {7'(c1), 5'(c2), 4'(f1), 4'(f2), 4'(f3)};
  endfunction

  // --- DLL access ---------------------------------------------------------
  task automatic status(output int cnt, output bit lead, output bit lag, output bit done);
    logic [31:0] s;
    wb_read(DLL | 32'(REG_STATUS), s);
    cnt = int'(s[15:8]); lead = s[0]; lag = s[1]; done = s[16];
  endtask

  // spin until n new phase comparisons have arrived; returns the last state
  task automatic wait_cmp(input int n, output bit lead, output bit lag);
    int c0, c;
    bit dn;
    status(c0, lead, lag, dn);
    do status(c, lead, lag, dn); while (((c - c0) & 8'hFF) < n);
  endtask

  task automatic set_code(input logic [23:0] c);
    logic [31:0] f;
    code = c;
    wb_write(DLL | 32'(REG_CTRL), 32'(c));
    if (filt_on) begin
      do wb_read(DLL | 32'(REG_FILT), f); while (f[23:0] != c);
    end
  endtask

  task automatic tdc_measure(input bit phase, output int v);
    int c; bit l, g, dn;
    logic [31:0] t;
    wb_write(DLL | 32'(REG_CONFIG), {29'd0, filt_on, 1'b1, phase});
    wb_write(DLL | 32'(REG_CONFIG), {29'd0, filt_on, 1'b0, phase});
    do status(c, l, g, dn); while (!dn);
    wb_read(DLL | 32'(REG_TDC), t);
    v = int'(t);
  endtask

  // one tune: apply the code and return the phase state it produces
  task automatic tune(input logic [23:0] c, output bit lead, output bit lag);
    set_code(c);
    wait_cmp(2, lead, lag);
  endtask

  // apply the code, then measure the phase error it leaves (TDC counts) and its sign
  task automatic tune_measure(input logic [23:0] c, output int err, output bit lead, output bit lag);
    int c0; bit dn, l0, g0;
    set_code(c);
    wait_cmp(1, l0, g0);
    tdc_measure(1'b1, err);
    status(c0, lead, lag, dn);
    err = err - OFF_ERR;
    if (err < 0) err = 0;
    last_err = err;
  endtask

  task automatic set_filter(input bit on);
    filt_on = on;
    wb_write(DLL | 32'(REG_CONFIG), {29'd0, on, 1'b1, 1'b1});
  endtask

  // --- the locking strategy -------------------------------------------------
  task automatic map_reference();
    int t;
    tdc_measure(1'b0, t);
    t = t - OFF_EXT;
    n_map_ref++;
    code = code_for_line(longint'(t) * 20000 / 8);
  endtask

  // coarse tune; returns with the phase error below TH_FINE
  task automatic coarse_tune();
    int err; bit lead, lag;
    logic [11:0] coarse;
    forever begin
      tune_measure(code, err, lead, lag);
      if (err < TH_FINE) break;
      if (err > TH_MAP) begin
        n_map_err++;
        code = code_for_line(line_fs(code) + (lead ? 1 : -1) * longint'(err) * 20000 / 8);
      end else begin
        n_seq_coarse++;
        coarse = code[23:12];
        if (lead && coarse != 12'hFFF) coarse++;
        else if (lag && coarse != 0)   coarse--;
        code = {coarse, 12'd0};
      end
    end
    // start the fine search just below the target, with the fine part
    // cleared: the target then lies within the fine range (one C2 step plus
    // the measurement uncertainty)
    code = code_for_line(line_fs(code) + (lead ? 1 : -1) * longint'(err) * 20000 / 8 - 3000);
    code = {code[23:12], 12'd0};
  endtask

  // prune-and-search: one fine bit per tune, MSB first
  task automatic prune_and_search();
    bit lead, lag;
    logic [11:0] fine = '0;
    for (int b = 11; b >= 0; b--) begin
      fine[b] = 1'b1;
      tune({code[23:12], fine}, lead, lag);
      n_prune++;
      if (lag) fine[b] = 1'b0;
    end
    code = {code[23:12], fine};
  endtask

  // sequential fine search until lead/lag alternate four times; 0 if it gives up
  task automatic fine_sequential(output bit ok);
    bit lead, lag, prev;
    int alt = 0;
    ok = 1'b0;
    tune(code, lead, lag);
    prev = lead;
    for (int k = 0; k < 64; k++) begin
      code = lead ? code + 24'd1 : code - 24'd1;
      n_seq_fine++;
      tune(code, lead, lag);
      alt = (lead != prev) ? alt + 1 : 0;
      prev = lead;
      if (alt >= 4) begin ok = 1'b1; break; end
    end
  endtask

  // full lock: from TDC mapping to the alternating phase state
  task automatic acquire(input bit from_reference);
    bit ok;
    locked = 1'b0;
    if (from_reference) map_reference();
    forever begin
      coarse_tune();
      prune_and_search();
      fine_sequential(ok);
      if (ok) break;
      n_back_to_coarse++;
    end
    locked = 1'b1;
    n_lock++;
  endtask

  // locked: tuning stopped; re-measure every few periods, relock when needed
  task automatic monitor(input int rounds, output bit lost);
    int err; bit lead, lag;
    lost = 1'b0;
    repeat (rounds) begin
      wait_cmp(3, lead, lag);
      tdc_measure(1'b1, err);
      err -= OFF_ERR;
      last_err = err;
      if (err >= TH_FINE) begin
        lost = 1'b1;
        locked = 1'b0;
        n_back_to_coarse++;
        break;
      end
    end
  endtask

endmodule
