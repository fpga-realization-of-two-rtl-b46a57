// tb_fo_chaos_top: end-to-end test of the whole design at its default parameters.
// Sequence: hold with trigger = 10 (nothing moves), release (trigger = 00) and run the
// predefined-time law with Tc = 1 for 4000 steps, re-arm, run the fixed-time law for
// 2000 steps, re-arm with a drive/response pair 20 apart so that the error probes
// saturate, and run 200 steps. Checks: hold, start latency and step_count; every
// probe word against an independent quantisation of the full-precision outputs
// (floor(v * 2^f), clamped to the probe width), one clock after the step; the Chen
// oscillator visiting both lobes within its probe range; synchronization reached in
// the predefined-time run. Each mechanism (hold, run, re-arm, FTS law, PTS law,
// delayed states taken from the history buffer, probe saturation, synchronization)
// is counted and must occur at least once.
`timescale 1ns/1ps
module tb_fo_chaos_top;
  import fx_pkg::*;

  logic               clk = 0, rst_n = 0, mode = 0;
  logic [1:0]         trigger = 2'b10;
  fx_t                inv_tc;
  fx_t                x0 [4], y0 [4];
  logic signed [11:0] chen_probe [3];
  logic signed [15:0] e_probe [4];
  logic               probe_valid;
  logic [31:0]        step_count;
  fx_t                chen_x [3], sync_x [4], sync_y [4], sync_e [4];
  logic               hist_full;
  int                 checks = 0, failures = 0;

  fo_chaos_top dut (.clk, .rst_n, .trigger, .mode, .inv_tc, .x0, .y0, .chen_probe, .e_probe,
                    .probe_valid, .step_count, .chen_x, .sync_x, .sync_y, .sync_e, .hist_full);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(fx_t a);
    return real'(a) / 4294967296.0;
  endfunction

  function automatic real fabs(real a);
    return a < 0.0 ? -a : a;
  endfunction

  // Independent probe quantisation: floor(v * 2^f) clamped to w bits.
  function automatic longint quant(real v, int w, int f);
    real    s;
    longint q, hi;
    s  = v * (2.0 ** f);
    q  = longint'(s);
    if (real'(q) > s) q = q - 1;
    hi = (longint'(1) << (w - 1)) - 1;
    if (q > hi) q = hi;
    if (q < -hi - 1) q = -hi - 1;
    return q;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters.
  int n_hold, n_run, n_rearm, n_fts, n_pts, n_delayed, n_sat, n_sync, n_probe;

  fx_t  last_e [4];
  fx_t  last_c [3];
  logic last_step;
  real  cmin, cmax, emax;

  // Probe check: probes registered at the edge where a step happened reflect the
  // states before that step.
  always @(posedge clk) begin
    if (rst_n && dut.step) begin
      last_e    <= sync_e;
      last_c    <= chen_x;
    end
    last_step <= rst_n && dut.step;
  end

  always @(negedge clk) begin
    if (last_step) begin
      check("probe_valid", probe_valid);
      for (int i = 0; i < 4; i++) begin
        check($sformatf("e_probe %0d", i), longint'(e_probe[i]) == quant(r(last_e[i]), 16, 11));
        if (e_probe[i] == 16'sh7fff || e_probe[i] == -16'sh8000) n_sat++;
      end
      for (int i = 0; i < 3; i++)
        check($sformatf("chen_probe %0d", i), longint'(chen_probe[i]) == quant(r(last_c[i]), 12, 5));
      n_probe++;
    end
  end

  task automatic set_ic(real xi [4], real yi [4]);
    for (int i = 0; i < 4; i++) begin
      x0[i] = fx_const(xi[i]);
      y0[i] = fx_const(yi[i]);
    end
  endtask

  task automatic hold_and_release();
    fx_t sx;
    trigger = 2'b10;
    repeat (6) @(negedge clk);
    sx = sync_y[2];
    repeat (5) @(negedge clk);
    check("hold: load", dut.load && !dut.step);
    check("hold: states frozen", sync_y[2] == sx && step_count == 0);
    for (int i = 0; i < 4; i++)
      check("hold: preset", fabs(r(sync_x[i]) - r(x0[i])) < 1e-4 && fabs(r(sync_y[i]) - r(y0[i])) < 1e-4);
    n_hold++;
    trigger = 2'b00;
    repeat (3) @(negedge clk);
    check("start after 3 clocks", dut.step);
    n_run++;
  endtask

  task automatic run_steps(int n);
    int t_sync;
    t_sync = -1;
    for (int s = 0; s < n; s++) begin
      @(negedge clk);
      if (hist_full) n_delayed++;
      if (mode) n_pts++; else n_fts++;
      emax = 0.0;
      for (int i = 0; i < 4; i++) if (fabs(r(sync_e[i])) > emax) emax = fabs(r(sync_e[i]));
      if (emax >= 0.01) t_sync = -1; else if (t_sync < 0) t_sync = s;
      if (r(chen_x[0]) < cmin) cmin = r(chen_x[0]);
      if (r(chen_x[0]) > cmax) cmax = r(chen_x[0]);
    end
    check("step_count", step_count == 32'(n));
    if (t_sync >= 0) n_sync++;
    $display("mode %0d: %0d steps, synchronized (|e|<0.01) from t = %f s", mode, n, t_sync * 0.0005);
  endtask

  real xa [4] = '{1.67, 3.0, 0.5, -0.54};
  real ya [4] = '{5.51, -2.0, -2.5, 1.46};
  real xs [4] = '{-0.4, 3.0, 5.3, -1.0};
  real ys [4] = '{19.6, -17.0, 5.3, -1.0};

  initial begin
    cmin = 0.0; cmax = 0.0;
    n_hold = 0; n_run = 0; n_rearm = 0; n_fts = 0; n_pts = 0;
    n_delayed = 0; n_sat = 0; n_sync = 0; n_probe = 0;
    set_ic(xa, ya);
    inv_tc = fx_const(1.0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Predefined-time law, Tc = 1.
    mode = 1;
    hold_and_release();
    run_steps(4000);
    // Re-arm, fixed-time law.
    mode = 0;
    hold_and_release();
    n_rearm++;
    run_steps(2000);
    // Re-arm with a large initial error: error probes saturate at +-16.
    set_ic(xs, ys);
    mode = 1;
    hold_and_release();
    n_rearm++;
    run_steps(200);
    check("Chen x1 visits both lobes", cmin < -5.0 && cmax > 5.0);
    check("Chen x1 within probe range", cmin > -64.0 && cmax < 64.0);
    $display("Chen x1 range %f .. %f", cmin, cmax);
    $display("mechanisms: hold %0d run %0d rearm %0d fts %0d pts %0d delayed %0d saturated %0d synchronized %0d probes %0d",
             n_hold, n_run, n_rearm, n_fts, n_pts, n_delayed, n_sat, n_sync, n_probe);
    check("hold seen", n_hold > 0);
    check("run seen", n_run > 0);
    check("re-arm seen", n_rearm > 0);
    check("FTS law used", n_fts > 0);
    check("PTS law used", n_pts > 0);
    check("delayed states from history", n_delayed > 0);
    check("probe saturation seen", n_sat > 0);
    check("synchronization reached", n_sync > 0);
    check("probes sampled", n_probe > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
