// tb_fotd_response: runs the response system alone for 2000 Euler steps from
// [5.51, -2, -2.5, 1.46] with fixed control inputs (u_a and the D^(a-1) part K
// constant per lane for the first 1000 steps, zero afterwards) next to a
// floating-point model: Bode filter per state, exact tanh with the delay, and the
// integral of K subtracted from the state. Compares y every 50 steps and fy at every
// step against the hardware's own states, and checks that K moves the state by
// exactly the integral of K (the filter is bypassed for that part).
`timescale 1ns/1ps
module tb_fotd_response;
  import fx_pkg::*;

  localparam real G = 2.2675, K = 216.692, L = 278.2968, M = 361.567, N = 778.819, P = 10.0;
  localparam real DT = 0.0005;
  localparam int  DEPTH = 20;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  fx_t  y0 [4], u_a [4], kc [4], y [4], fy [4];
  int   checks = 0, failures = 0;

  fotd_response dut (.clk, .rst_n, .load, .step, .y0, .u_a, .kc, .y, .fy);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (fabs(got - exp) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  real mz [4][3];
  real my [4], mw [4], mf [4];
  real hist [DEPTH][4];
  real yd [4], v [4], d3, ua_r [4], k_r [4], hy [4];
  real init [4] = '{5.51, -2.0, -2.5, 1.46};
  real ua_c [4] = '{0.5, -0.3, 0.2, 0.0};
  real k_c  [4] = '{1.0, -2.0, 0.5, 0.0};

  initial begin
    for (int i = 0; i < 4; i++) begin
      y0[i] = fx_const(init[i]);
      u_a[i] = '0;
      kc[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    for (int i = 0; i < 4; i++) begin
      mz[i] = '{init[i] / (G * L), 0.0, 0.0};
      mw[i] = 0.0;
      my[i] = init[i];
      check("preset", r(y[i]), init[i], 1e-6);
    end
    for (int s = 0; s < 2000; s++) begin
      for (int i = 0; i < 4; i++) begin
        ua_r[i] = (s < 1000) ? ua_c[i] : 0.0;
        k_r[i]  = (s < 1000) ? k_c[i] : 0.0;
        u_a[i]  = fx_const(ua_r[i]);
        kc[i]   = fx_const(k_r[i]);
        hy[i]   = r(y[i]);
      end
      #1;
      check("fy1", r(fy[0]), 10.0 * (hy[1] - hy[0]) + hy[3], 1e-5);
      check("fy2", r(fy[1]), 28.0 * hy[0] - hy[1] - hy[0] * hy[2], 1e-5);
      check("fy3", r(fy[2]), hy[0] * hy[1] - 2.6667 * hy[2], 1e-5);
      check("fy4", r(fy[3]), -hy[1] * hy[2] - hy[3], 1e-5);
      for (int i = 0; i < 4; i++) yd[i] = (s < DEPTH) ? init[i] : hist[s % DEPTH][i];
      for (int i = 0; i < 4; i++) hist[s % DEPTH][i] = my[i];
      mf[0] = 10.0 * (my[1] - my[0]) + my[3];
      mf[1] = 28.0 * my[0] - my[1] - my[0] * my[2];
      mf[2] = my[0] * my[1] - 2.6667 * my[2];
      mf[3] = -my[1] * my[2] - my[3];
      for (int i = 0; i < 4; i++) begin
        v[i] = mf[i] - 0.1 * my[i] + 0.1 * $tanh(yd[i]) + ua_r[i];
        d3 = -P * mz[i][0] - N * mz[i][1] - M * mz[i][2] + v[i];
        mz[i][0] += mz[i][1] * DT;
        mz[i][1] += mz[i][2] * DT;
        mz[i][2] += d3 * DT;
        mw[i] += k_r[i] * DT;
        my[i] = G * (L * mz[i][0] + K * mz[i][1] + mz[i][2]) - mw[i];
      end
      step = 1;
      @(negedge clk);
      step = 0;
      if (s % 50 == 49)
        for (int i = 0; i < 4; i++)
          check($sformatf("y%0d step %0d", i + 1, s + 1), r(y[i]), my[i], 0.02);
    end
    // The D^(a-1) path is an exact integrator: after 1000 steps of K = 1 the first
    // lane carries w = 1000 * dt * 1 = 0.5 (checked through the model above); here a
    // single step with K = 2000 must move y4 by -1 on top of its filter motion.
    for (int i = 0; i < 4; i++) begin
      u_a[i] = '0;
      kc[i]  = '0;
    end
    kc[3] = fx_const(2000.0);
    hy[3] = r(y[3]);
    step = 1;
    @(negedge clk);
    step = 0;
    check("K integrator step", r(y[3]) - hy[3], -1.0, 0.05);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
