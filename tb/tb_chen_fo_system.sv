// tb_chen_fo_system: runs the fractional-order Chen system for 15000 Euler steps
// (7.5 s of model time) next to a floating-point model of the same nine-state
// equations and compares the three Chen states every 100 steps up to step 8000;
// later the two chaotic trajectories separate and only boundedness is checked.
// Because the system is chaotic the tolerance grows with time (fixed-point rounding is amplified along
// the trajectory). Also checks the initial vector after load, that the trajectory
// visits both lobes of the attractor (x1 changes sign) and stays bounded.
`timescale 1ns/1ps
module tb_chen_fo_system;
  import fx_pkg::*;

  localparam real G = 2.2675, K = 216.692, L = 278.2968, M = 361.567, N = 778.819, P = 10.0;
  localparam real DT = 0.0005;
  localparam int  STEPS = 15000;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  fx_t  x [3];
  fx_t  z [9];
  int   checks = 0, failures = 0;

  chen_fo_system dut (.clk, .rst_n, .load, .step, .x, .z);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
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
      $display("FAIL %s: got %f expected %f (tol %f)", what, got, exp, tol);
    end
  endtask

  real mz [9];
  real mx [3];
  real mv [3];
  real d  [9];
  real tol, xmin, xmax;

  task automatic model_out();
    for (int i = 0; i < 3; i++) mx[i] = G * (L * mz[3*i] + K * mz[3*i+1] + mz[3*i+2]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    mz = '{0.0, 0.0, 2.0, 0.0, 0.0, 1.0, 0.0, 0.0, 3.0};
    model_out();
    for (int i = 0; i < 9; i++) check($sformatf("init z%0d", i + 1), r(z[i]), mz[i], 1e-9);
    xmin = 0.0; xmax = 0.0;
    for (int s = 1; s <= STEPS; s++) begin
      step = 1;
      @(negedge clk);
      mv[0] = 35.0 * (mx[1] - mx[0]);
      mv[1] = -mx[0] * mx[2] + 28.0 * mx[1] - 7.0 * mx[0];
      mv[2] = -3.0 * mx[2] + mx[0] * mx[1];
      for (int i = 0; i < 3; i++) begin
        d[3*i]   = mz[3*i+1];
        d[3*i+1] = mz[3*i+2];
        d[3*i+2] = -P * mz[3*i] - N * mz[3*i+1] - M * mz[3*i+2] + mv[i];
      end
      for (int i = 0; i < 9; i++) mz[i] = mz[i] + d[i] * DT;
      model_out();
      if (r(x[0]) < xmin) xmin = r(x[0]);
      if (r(x[0]) > xmax) xmax = r(x[0]);
      if (s % 100 == 0 && s <= 8000) begin
        tol = (s <= 4000) ? 0.01 : 0.5;
        for (int i = 0; i < 3; i++) check($sformatf("x%0d step %0d", i + 1, s), r(x[i]), mx[i], tol);
      end
    end
    step = 0;
    checks++;
    if (!(xmin < -5.0 && xmax > 5.0)) begin
      failures++;
      $display("FAIL x1 does not visit both lobes: %f .. %f", xmin, xmax);
    end
    checks++;
    if (xmin < -100.0 || xmax > 100.0) begin
      failures++;
      $display("FAIL unbounded: %f .. %f", xmin, xmax);
    end
    $display("x1 range %f .. %f", xmin, xmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
