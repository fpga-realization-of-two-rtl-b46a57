// tb_pow_pwl: compares the piecewise-linear power |e|^p with the real power for the
// two exponents used by the controllers (2.61 and 2.6): breakpoints, segment
// midpoints and 2000 random arguments in [0, 16), plus zero, a negative input and
// saturation above 16. Tolerance max(3.5e-3, 0.2 % of the value).
`timescale 1ns/1ps
module tb_pow_pwl;
  import fx_pkg::*;

  fx_t a, y1, y2;
  int  checks = 0, failures = 0;
  real ar;

  pow_pwl #(.EXPONENT(2.61)) dut1 (.a(a), .y(y1));
  pow_pwl #(.EXPONENT(2.6))  dut2 (.a(a), .y(y2));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(fx_t v);
    return real'(v) / 4294967296.0;
  endfunction

  task automatic cmp(string what, real got, real exp);
    real tol;
    tol = exp * 0.002;
    if (tol < 0.0035) tol = 0.0035;
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic try(real v);
    real vc;
    a = fx_const(v);
    #1;
    vc = v < 0.0 ? 0.0 : (v > 16.0 ? 16.0 : v);
    cmp($sformatf("%f^2.61", v), r(y1), vc ** 2.61);
    cmp($sformatf("%f^2.6", v),  r(y2), vc ** 2.6);
  endtask

  initial begin
    for (int i = 0; i <= 63; i++) try(real'(i) * 0.25);
    for (int i = 0; i < 64; i++) try(real'(i) * 0.25 + 0.125);
    try(0.0); try(-3.0); try(16.0); try(40.0);
    for (int i = 0; i < 2000; i++) begin
      ar = real'($urandom_range(0, 1599999)) / 100000.0;
      try(ar);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
