// tb_sync_workloads: the synchronization experiments on the complete design at its
// default parameters: the three drive/response initial-condition pairs, each under
// the fixed-time law and under the predefined-time law with Tc = 1 and Tc = 1.5
// (nine runs). For each run it measures the time from which all four error probes
// stay within +-0.01 (|e_probe| < 21 at 11 fractional bits) and checks that every run
// synchronizes within 12 s of model time, that for every pair the predefined-time
// law with Tc = 1 settles before the one with Tc = 1.5, and that the settling times
// of one law differ by less than 10 % between the pairs.
`timescale 1ns/1ps
module tb_sync_workloads;
  import fx_pkg::*;

  localparam int MAX_STEPS = 24000;

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
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  real xs [3][4] = '{'{1.67, 3.0, 0.5, -0.54}, '{-0.7, -0.8, -3.5, -1.0}, '{-0.4, 3.0, 5.3, -1.0}};
  real ys [3][4] = '{'{5.51, -2.0, -2.5, 1.46}, '{1.8, 3.0, -0.5, -2.0}, '{0.5, 5.0, 7.0, -5.0}};
  real tset [3][3];   // [law: FTS, PTS Tc=1, PTS Tc=1.5][pair]

  task automatic run(int law, int pair);
    int  t_in;
    bit  in_band;
    for (int i = 0; i < 4; i++) begin
      x0[i] = fx_const(xs[pair][i]);
      y0[i] = fx_const(ys[pair][i]);
    end
    mode   = (law != 0);
    inv_tc = fx_const(law == 2 ? 1.0 / 1.5 : 1.0);
    trigger = 2'b10;
    repeat (6) @(negedge clk);
    trigger = 2'b00;
    t_in = -1;
    for (int s = 0; s < MAX_STEPS; s++) begin
      @(negedge clk);
      if (!probe_valid) continue;
      in_band = 1'b1;
      for (int i = 0; i < 4; i++) if (e_probe[i] > 16'sd20 || e_probe[i] < -16'sd20) in_band = 1'b0;
      if (!in_band) t_in = -1;
      else if (t_in < 0) t_in = int'(step_count);
    end
    tset[law][pair] = (t_in < 0) ? -1.0 : real'(t_in) * 0.0005;
    $display("law %0d pair %0d: synchronized from t = %f s", law, pair, tset[law][pair]);
    check($sformatf("law %0d pair %0d synchronizes", law, pair), t_in >= 0);
  endtask

  real lo, hi;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int law = 0; law < 3; law++)
      for (int pair = 0; pair < 3; pair++)
        run(law, pair);
    for (int pair = 0; pair < 3; pair++)
      check($sformatf("Tc = 1 settles before Tc = 1.5 (pair %0d)", pair), tset[1][pair] < tset[2][pair]);
    for (int law = 0; law < 3; law++) begin
      lo = tset[law][0]; hi = tset[law][0];
      for (int pair = 1; pair < 3; pair++) begin
        if (tset[law][pair] < lo) lo = tset[law][pair];
        if (tset[law][pair] > hi) hi = tset[law][pair];
      end
      check($sformatf("law %0d settling time independent of initial condition", law), hi < 1.1 * lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
