// tb_fotd_sync: closed-loop drive/response synchronization against a floating-point
// model of the whole loop (drive, response, controller with exact tanh and exact
// powers). Three runs from three initial-condition pairs:
//   1. fixed-time law, 3000 steps (1.5 s)
//   2. predefined-time law, Tc = 1,   5000 steps (2.5 s)
//   3. predefined-time law, Tc = 1.5, 6000 steps (3 s)
// Every 100 steps the four errors are compared with the model (tolerance 0.02). For
// the predefined-time runs the time at which all |e_i| first stay below 0.01 is
// measured in hardware and in the model and must agree within 2 %, and the run must
// end synchronized.
`timescale 1ns/1ps
module tb_fotd_sync;
  import fx_pkg::*;

  localparam real G = 2.2675, K = 216.692, L = 278.2968, M = 361.567, N = 778.819, P = 10.0;
  localparam real DT = 0.0005;
  localparam int  DEPTH = 20;

  logic clk = 0, rst_n = 0, load = 0, step = 0, mode = 0;
  fx_t  inv_tc;
  fx_t  x0 [4], y0 [4], x [4], y [4], e [4];
  logic hist_full;
  int   checks = 0, failures = 0;

  fotd_sync dut (.clk, .rst_n, .load, .step, .mode, .inv_tc, .x0, .y0, .x, .y, .e, .hist_full);

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

  function automatic real sgn(real a);
    return a > 0.0 ? 1.0 : (a < 0.0 ? -1.0 : 0.0);
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (fabs(got - exp) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  // Floating-point model state.
  real xz [4][3], yz [4][3], w [4];
  real mx [4], my [4], hx [DEPTH][4], hy [DEPTH][4];

  task automatic filt(ref real z [3], input real v);
    real d3;
    d3 = -P * z[0] - N * z[1] - M * z[2] + v;
    z[0] += z[1] * DT;
    z[1] += z[2] * DT;
    z[2] += d3 * DT;
  endtask

  task automatic model_step(int s, bit pts, real tc, real xi [4], real yi [4]);
    real xd [4], yd [4], fxv [4], fyv [4], ev, kv, vx, vy;
    for (int i = 0; i < 4; i++) begin
      xd[i] = (s < DEPTH) ? xi[i] : hx[s % DEPTH][i];
      yd[i] = (s < DEPTH) ? yi[i] : hy[s % DEPTH][i];
      hx[s % DEPTH][i] = mx[i];
      hy[s % DEPTH][i] = my[i];
    end
    fxv[0] = 10.0 * (mx[1] - mx[0]);
    fxv[1] = 28.0 * mx[0] - mx[0] * mx[2] + mx[3];
    fxv[2] = mx[0] * mx[0] - 2.6667 * mx[2] + mx[3];
    fxv[3] = -mx[1];
    fyv[0] = 10.0 * (my[1] - my[0]) + my[3];
    fyv[1] = 28.0 * my[0] - my[1] - my[0] * my[2];
    fyv[2] = my[0] * my[1] - 2.6667 * my[2];
    fyv[3] = -my[1] * my[2] - my[3];
    for (int i = 0; i < 4; i++) begin
      ev = my[i] - mx[i];
      if (pts) kv = 0.0534 / tc * (12.9 * sgn(ev) * (fabs(ev) ** 2.6) + 11.0 * sgn(ev));
      else     kv = (2.0 ** 1.9) / (4.0 ** (1.0 - 2.61)) * 0.007 * sgn(ev) * (fabs(ev) ** 2.61)
                  + (2.0 ** 1.9) * 0.003 * sgn(ev);
      vx = fxv[i] - 0.1 * mx[i] + 0.1 * $tanh(xd[i]);
      vy = fyv[i] - 0.1 * my[i] + 0.1 * $tanh(yd[i])
         + 0.1 * ev - (fyv[i] - fxv[i]) - 0.2 * sgn(ev);
      filt(xz[i], vx);
      filt(yz[i], vy);
      w[i] += kv * DT;
    end
    for (int i = 0; i < 4; i++) begin
      mx[i] = G * (L * xz[i][0] + K * xz[i][1] + xz[i][2]);
      my[i] = G * (L * yz[i][0] + K * yz[i][1] + yz[i][2]) - w[i];
    end
  endtask

  task automatic run(bit pts, real tc, real xi [4], real yi [4], int nsteps, bit need_sync);
    int  t_hw, t_mod;
    real emax_hw, emax_mod;
    mode   = pts;
    inv_tc = fx_const(1.0 / tc);
    for (int i = 0; i < 4; i++) begin
      x0[i] = fx_const(xi[i]);
      y0[i] = fx_const(yi[i]);
      xz[i] = '{xi[i] / (G * L), 0.0, 0.0};
      yz[i] = '{yi[i] / (G * L), 0.0, 0.0};
      w[i]  = 0.0;
      mx[i] = xi[i];
      my[i] = yi[i];
    end
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    t_hw = -1; t_mod = -1;
    for (int s = 0; s < nsteps; s++) begin
      emax_hw = 0.0; emax_mod = 0.0;
      for (int i = 0; i < 4; i++) begin
        if (fabs(r(e[i])) > emax_hw) emax_hw = fabs(r(e[i]));
        if (fabs(my[i] - mx[i]) > emax_mod) emax_mod = fabs(my[i] - mx[i]);
      end
      if (emax_hw >= 0.01) t_hw = -1; else if (t_hw < 0) t_hw = s;
      if (emax_mod >= 0.01) t_mod = -1; else if (t_mod < 0) t_mod = s;
      if (s % 100 == 0)
        for (int i = 0; i < 4; i++)
          check($sformatf("mode %0d e%0d step %0d", pts, i + 1, s), r(e[i]), my[i] - mx[i], 0.02);
      model_step(s, pts, tc, xi, yi);
      step = 1;
      @(negedge clk);
      step = 0;
    end
    $display("mode %0d Tc %f: |e|<0.01 from t = %f (hardware), %f (model); final e = %f %f %f %f",
             pts, tc, t_hw * DT, t_mod * DT, r(e[0]), r(e[1]), r(e[2]), r(e[3]));
    if (need_sync) begin
      checks++;
      if (t_hw < 0 || t_mod < 0) begin
        failures++;
        $display("FAIL not synchronized");
      end else
        check("settling time", real'(t_hw) * DT, real'(t_mod) * DT, 0.02 * real'(t_mod) * DT);
    end
  endtask

  real xa [4] = '{1.67, 3.0, 0.5, -0.54};
  real ya [4] = '{5.51, -2.0, -2.5, 1.46};
  real xb [4] = '{-0.7, -0.8, -3.5, -1.0};
  real yb [4] = '{1.8, 3.0, -0.5, -2.0};
  real xc [4] = '{-0.4, 3.0, 5.3, -1.0};
  real yc [4] = '{0.5, 5.0, 7.0, -5.0};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b0, 1.0, xa, ya, 3000, 1'b0);
    run(1'b1, 1.0, xb, yb, 5000, 1'b1);
    run(1'b1, 1.5, xc, yc, 6000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
