// tb_tanh_pwl: compares the piecewise-linear tanh with $tanh at the breakpoints,
// at segment midpoints (where the interpolation error is largest), in the saturated
// region and at 2000 random arguments in [-6, 6]. Tolerance 2e-3; odd symmetry is
// checked exactly.
`timescale 1ns/1ps
module tb_tanh_pwl;
  import fx_pkg::*;

  fx_t a, y, yn;
  int  checks = 0, failures = 0;
  real ar;

  tanh_pwl dut (.a(a), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(fx_t v);
    return real'(v) / 4294967296.0;
  endfunction

  task automatic try(real v);
    real got, exp;
    a = fx_const(v);
    #1;
    got = r(y);
    exp = $tanh(v);
    checks++;
    if (got > exp + 2e-3 || got < exp - 2e-3) begin
      failures++;
      $display("FAIL tanh(%f): got %f expected %f", v, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i <= 40; i++) try(real'(i) * 0.125);
    for (int i = 0; i < 32; i++) try(real'(i) * 0.125 + 0.0625);
    try(4.5); try(10.0); try(-10.0); try(1000.0);
    for (int i = 0; i < 2000; i++) begin
      ar = (real'($urandom_range(0, 1200000)) - 600000.0) / 100000.0;
      try(ar);
    end
    // Odd symmetry, bit exact.
    for (int i = 0; i < 200; i++) begin
      a = fx_t'({$urandom_range(0, 7), $urandom()});
      #1;
      yn = y;
      a = -a;
      #1;
      checks++;
      if (y != -yn) begin
        failures++;
        $display("FAIL symmetry at %f", r(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
