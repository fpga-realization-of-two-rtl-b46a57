// tb_fotd_drive: runs the drive time-delay system for 4000 Euler steps (2 s) from the
// initial condition [1.67, 3, 0.5, -0.54] next to a floating-point model (same
// Bode filter, Euler rule, exact tanh, delay of DEPTH steps with constant prehistory)
// and compares the four states every 50 steps (the tolerance widens in the second
// second because the chaotic drive amplifies rounding). Also checks the preset after
// load, that hist_full rises exactly after DEPTH steps, and the coupling terms fx
// against the hardware's own states at every step.
`timescale 1ns/1ps
module tb_fotd_drive;
  import fx_pkg::*;

  localparam real G = 2.2675, K = 216.692, L = 278.2968, M = 361.567, N = 778.819, P = 10.0;
  localparam real DT = 0.0005;
  localparam int  DEPTH = 20;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  fx_t  x0 [4];
  fx_t  x  [4];
  fx_t  fx [4];
  logic hist_full;
  int   checks = 0, failures = 0;

  fotd_drive dut (.clk, .rst_n, .load, .step, .x0, .x, .fx, .hist_full);

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
  real mx [4];
  real hist [DEPTH][4];
  real xd [4], v [4], f [4], d3;
  real init [4] = '{1.67, 3.0, 0.5, -0.54};

  initial begin
    for (int i = 0; i < 4; i++) x0[i] = fx_const(init[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    for (int i = 0; i < 4; i++) begin
      mz[i] = '{init[i] / (G * L), 0.0, 0.0};
      mx[i] = init[i];
      check($sformatf("preset x%0d", i + 1), r(x[i]), init[i], 1e-6);
    end
    for (int s = 0; s < 4000; s++) begin
      checks++;
      if (hist_full != (s >= DEPTH)) begin
        failures++;
        $display("FAIL hist_full at step %0d", s);
      end
      // Model step s.
      for (int i = 0; i < 4; i++) xd[i] = (s < DEPTH) ? init[i] : hist[s % DEPTH][i];
      for (int i = 0; i < 4; i++) hist[s % DEPTH][i] = mx[i];
      f[0] = 10.0 * (mx[1] - mx[0]);
      f[1] = 28.0 * mx[0] - mx[0] * mx[2] + mx[3];
      f[2] = mx[0] * mx[0] - 2.6667 * mx[2] + mx[3];
      f[3] = -mx[1];
      // Coupling terms, as a function of the hardware's own states.
      check($sformatf("fx1 step %0d", s), r(fx[0]), 10.0 * (r(x[1]) - r(x[0])), 1e-6);
      check($sformatf("fx2 step %0d", s), r(fx[1]), 28.0 * r(x[0]) - r(x[0]) * r(x[2]) + r(x[3]), 1e-5);
      check($sformatf("fx3 step %0d", s), r(fx[2]), r(x[0]) * r(x[0]) - 2.6667 * r(x[2]) + r(x[3]), 1e-5);
      check($sformatf("fx4 step %0d", s), r(fx[3]), -r(x[1]), 1e-6);
      for (int i = 0; i < 4; i++) begin
        v[i] = f[i] - 0.1 * mx[i] + 0.1 * $tanh(xd[i]);
        d3 = -P * mz[i][0] - N * mz[i][1] - M * mz[i][2] + v[i];
        mz[i][0] += mz[i][1] * DT;
        mz[i][1] += mz[i][2] * DT;
        mz[i][2] += d3 * DT;
        mx[i] = G * (L * mz[i][0] + K * mz[i][1] + mz[i][2]);
      end
      step = 1;
      @(negedge clk);
      step = 0;
      if (s % 50 == 49)
        for (int i = 0; i < 4; i++)
          check($sformatf("x%0d step %0d", i + 1, s + 1), r(x[i]), mx[i], (s < 2000) ? 0.01 : 0.5);
    end
    $display("drive at t=2: %f %f %f %f", r(x[0]), r(x[1]), r(x[2]), r(x[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
