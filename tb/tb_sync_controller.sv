// tb_sync_controller: applies random drive/response states and coupling terms and
// compares e, u_a and K with the control laws evaluated in floating point:
//   u_a = 0.1 e - (fy - fx) - 0.2 sign(e)
//   FTS: K = 2^1.9 / 4^(1-2.61) * 0.007 sign(e)|e|^2.61 + 2^1.9 * 0.003 sign(e)
//   PTS: K = 0.0534 / Tc * (12.9 sign(e)|e|^2.6 + 11 sign(e))
// for both modes and Tc = 1, 1.5 and 0.5, with errors in [-12, 12] and the e = 0 case.
`timescale 1ns/1ps
module tb_sync_controller;
  import fx_pkg::*;

  logic mode;
  fx_t  inv_tc;
  fx_t  x [4], y [4], fx [4], fy [4];
  fx_t  e [4], u_a [4], kc [4];
  int   checks = 0, failures = 0;

  sync_controller dut (.mode, .inv_tc, .x, .y, .fx, .fy, .e, .u_a, .kc);

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

  function automatic real sgn(real a);
    return a > 0.0 ? 1.0 : (a < 0.0 ? -1.0 : 0.0);
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (fabs(got - exp) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  real tcs [3] = '{1.0, 1.5, 0.5};
  real xr [4], yr [4], fxr [4], fyr [4], er, kexp, tc;
  int  nmode [2];

  initial begin
    nmode = '{0, 0};
    for (int n = 0; n < 3000; n++) begin
      mode = n[0];
      tc   = tcs[n % 3];
      inv_tc = fx_const(1.0 / tc);
      for (int i = 0; i < 4; i++) begin
        xr[i]  = rnd(-20.0, 20.0);
        yr[i]  = (n % 10 == 0 && i == 2) ? xr[i] : xr[i] + rnd(-12.0, 12.0);
        fxr[i] = rnd(-300.0, 300.0);
        fyr[i] = rnd(-300.0, 300.0);
        x[i] = fx_const(xr[i]); y[i] = fx_const(yr[i]);
        fx[i] = fx_const(fxr[i]); fy[i] = fx_const(fyr[i]);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        er = r(y[i]) - r(x[i]);
        check("e", r(e[i]), er, 1e-9);
        check("u_a", r(u_a[i]), 0.1 * er - (fyr[i] - fxr[i]) - 0.2 * sgn(er), 1e-6);
        if (mode)
          kexp = 0.0534 / tc * (12.9 * sgn(er) * (fabs(er) ** 2.6) + 11.0 * sgn(er));
        else
          kexp = (2.0 ** 1.9) / (4.0 ** (1.0 - 2.61)) * 0.007 * sgn(er) * (fabs(er) ** 2.61)
               + (2.0 ** 1.9) * 0.003 * sgn(er);
        check($sformatf("K mode %0d e=%f", mode, er), r(kc[i]), kexp, 2e-3 + 3e-3 * fabs(kexp));
      end
      nmode[mode]++;
    end
    checks++;
    if (nmode[0] == 0 || nmode[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
