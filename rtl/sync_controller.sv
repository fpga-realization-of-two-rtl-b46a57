// sync_controller: fixed-time (FTS) and predefined-time (PTS) synchronization
// controller for a drive/response pair of fractional-order time-delay systems.
//
// Per lane i, with e = y - x and h(e) = fy - fx (the difference of the coupling terms
// of the response and drive systems):
//
//     u_i  = sigma e - h(e) - sign(e) L - D^(a-1) K_i
//     FTS: K_i = 2^(k1-1) / N^(1-q1 k1) * alpha1 sign(e)|e|^(q1 k1) + 2^(k1-1) lambda1 sign(e)
//     PTS: K_i = Cv / Tc * (alpha2 sign(e)|e|^(q2 k2) + lambda2 sign(e))
//
// The controller returns the two parts separately: u_a (applied under D^a) and kc = K
// (applied under D^(a-1), see fotd_response). The control laws and all constants
// (q1 = 0.9, k1 = 2.9, N = 4, L = 0.2, sigma = 0.1, lambda1 = 0.003, alpha1 = 0.007;
// q2 = 0.5, k2 = 5.2, alpha2 = 12.9, lambda2 = 11, Cv = 0.0534) are the published design's.
// The constant gains are folded at elaboration; |e|^(qk) comes from pow_pwl. Tc is the
// run-time tuning input, given as its reciprocal inv_tc so no divider is needed; the
// mode input selecting the law and sign(0) = 0 are this design's choices.
//
// Interface and timing: purely combinational.
module sync_controller
  import fx_pkg::*;
#(
  parameter real SIGMA   = 0.1,
  parameter real L       = 0.2,
  parameter real Q1      = 0.9,
  parameter real K1      = 2.9,
  parameter real N       = 4.0,
  parameter real LAMBDA1 = 0.003,
  parameter real ALPHA1  = 0.007,
  parameter real Q2      = 0.5,
  parameter real K2      = 5.2,
  parameter real ALPHA2  = 12.9,
  parameter real LAMBDA2 = 11.0,
  parameter real CV      = 0.0534
) (
  input  logic mode,            // 0: fixed-time law, 1: predefined-time law
  input  fx_t  inv_tc,          // 1 / Tc, Q32.32
  input  fx_t  x   [4],
  input  fx_t  y   [4],
  input  fx_t  fx  [4],
  input  fx_t  fy  [4],
  output fx_t  e   [4],
  output fx_t  u_a [4],
  output fx_t  kc  [4]
);

  localparam real P_FTS = Q1 * K1;
  localparam real P_PTS = Q2 * K2;

  localparam fx_t C_SIGMA = fx_const(SIGMA);
  localparam fx_t C_L     = fx_const(L);
  localparam fx_t C_F1    = fx_const((2.0 ** (K1 - 1.0)) / (N ** (1.0 - P_FTS)) * ALPHA1);
  localparam fx_t C_F0    = fx_const((2.0 ** (K1 - 1.0)) * LAMBDA1);
  localparam fx_t C_P1    = fx_const(CV * ALPHA2);
  localparam fx_t C_P0    = fx_const(CV * LAMBDA2);

  for (genvar i = 0; i < 4; i++) begin : g_lane
    fx_t ei, mag, sg, pw_f, pw_p, k_f, k_p;

    assign ei  = y[i] - x[i];
    assign mag = fx_abs(ei);
    assign sg  = fx_sign(ei);

    pow_pwl #(.EXPONENT(P_FTS)) u_pow_f (.a(mag), .y(pw_f));
    pow_pwl #(.EXPONENT(P_PTS)) u_pow_p (.a(mag), .y(pw_p));

    always_comb begin
      // sign(e) * (c1 |e|^p + c0): the magnitude is computed, then the sign applied.
      k_f = fx_mul(C_F1, pw_f) + C_F0;
      k_p = fx_mul(inv_tc, fx_mul(C_P1, pw_p) + C_P0);
      if (ei == 0)
        kc[i] = FX_ZERO;
      else if (mode)
        kc[i] = ei[FX_W-1] ? -k_p : k_p;
      else
        kc[i] = ei[FX_W-1] ? -k_f : k_f;
      e[i]   = ei;
      u_a[i] = fx_mul(C_SIGMA, ei) - (fy[i] - fx[i]) - fx_mul(C_L, sg);
    end
  end

endmodule
