// tb_frac_integrator: checks the 1/s^0.9 Bode-approximation integrator against a
// floating-point model of the same three-state chain stepped with forward Euler.
// Checks: load of the initial states, hold when step is low, 3000 steps with a
// constant input followed by state feedback v = -20 x + 40, the output
// x = g (l z1 + k z2 + z3) after every step, and that a step is visible exactly one
// clock after the strobe.
`timescale 1ns/1ps
module tb_frac_integrator;
  import fx_pkg::*;

  localparam real G = 2.2675, K = 216.692, L = 278.2968, M = 361.567, N = 778.819, P = 10.0;
  localparam real DT = 0.0005;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  fx_t  z0 [3];
  fx_t  v, x;
  fx_t  z [3];
  int   checks = 0, failures = 0;

  frac_integrator dut (.clk, .rst_n, .load, .z0, .step, .v, .x, .z);

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

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  real m1, m2, m3, mx, vr, d3;

  initial begin
    v = '0;
    z0[0] = fx_const(0.01); z0[1] = fx_const(-0.5); z0[2] = fx_const(3.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    check("load z1", r(z[0]), 0.01, 1e-9);
    check("load z2", r(z[1]), -0.5, 1e-9);
    check("load z3", r(z[2]), 3.0, 1e-9);
    m1 = 0.01; m2 = -0.5; m3 = 3.0;
    mx = G * (L * m1 + K * m2 + m3);
    check("load x", r(x), mx, 1e-6);
    // Hold: no step, states must not move.
    v = fx_const(100.0);
    repeat (5) @(negedge clk);
    check("hold z3", r(z[2]), 3.0, 1e-9);
    for (int s = 0; s < 3000; s++) begin
      vr = (s < 1500) ? 100.0 : (-20.0 * mx + 40.0);
      v  = (s < 1500) ? fx_const(100.0) : fx_t'(fx_mul(fx_const(-20.0), x) + fx_const(40.0));
      step = 1;
      @(negedge clk);
      step = 0;
      d3 = -P * m1 - N * m2 - M * m3 + vr;
      m1 = m1 + m2 * DT;
      m2 = m2 + m3 * DT;
      m3 = m3 + d3 * DT;
      mx = G * (L * m1 + K * m2 + m3);
      if (s % 100 == 99) begin
        check("z1", r(z[0]), m1, 1e-6 + 1e-5 * (m1 < 0 ? -m1 : m1));
        check("z3", r(z[2]), m3, 1e-4 + 1e-5 * (m3 < 0 ? -m3 : m3));
        check("x",  r(x),    mx, 1e-4 + 1e-5 * (mx < 0 ? -mx : mx));
      end
    end
    // One clock per step: a strobe moves the state at the next edge only.
    v = fx_const(1000.0);
    m3 = r(z[2]);
    step = 1;
    #1;
    check("no change before edge", r(z[2]), m3, 0.0);
    @(negedge clk);
    step = 0;
    checks++;
    if (z[2] == fx_const(m3)) begin
      failures++;
      $display("FAIL step had no effect");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
