// fotd_drive: drive fractional-order time-delay (FOTD) system of order 0.9,
//
//     D^a x1 = -s x1 + 0.1 tanh(x1(t-tau)) + A (x2 - x1)
//     D^a x2 = -s x2 + 0.1 tanh(x2(t-tau)) + B x1 - D x1 x3 + x4
//     D^a x3 = -s x3 + 0.1 tanh(x3(t-tau)) + H x1^2 - C x3 + x4
//     D^a x4 = -s x4 + 0.1 tanh(x4(t-tau)) - R x2
//
// Each state is a frac_integrator (Bode approximation of 1/s^0.9, forward Euler);
// the delayed states come from a delay_line of DEPTH steps (tau = DEPTH * dt) and go
// through tanh_pwl. The structure of the equations and the self-inhibition s = 0.1
// follow the published design; the coefficients A, B, C, D, H, R and the delay length are
// this design's choices, picked so that the drive stays bounded (|x| < 70) from the
// initial conditions used in the experiments. On load every filter is preset to
// z = (x0 / (g l), 0, 0), the DC state whose output is x0 to within rounding.
//
// Interface and timing: x and the coupling terms fx (everything except the -s x and
// tanh terms, needed by the synchronization controller) are combinational from the
// state registers; hist_full goes high once tau has elapsed and the delayed
// states come from the buffer rather than the initial condition. load
// (synchronous) presets the states from x0 and restarts the delay history; step
// advances one Euler step.
module fotd_drive
  import fx_pkg::*;
#(
  parameter real         A     = 10.0,
  parameter real         B     = 28.0,
  parameter real         C     = 2.6667,
  parameter real         D     = 1.0,
  parameter real         H     = 1.0,
  parameter real         R     = 1.0,
  parameter real         SIGMA = 0.1,
  parameter real         DT    = 0.0005,
  parameter int unsigned DEPTH = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic step,
  input  fx_t  x0 [4],
  output fx_t  x  [4],
  output fx_t  fx [4],
  output logic hist_full
);

  localparam fx_t C_A     = fx_const(A);
  localparam fx_t C_B     = fx_const(B);
  localparam fx_t C_C     = fx_const(C);
  localparam fx_t C_D     = fx_const(D);
  localparam fx_t C_H     = fx_const(H);
  localparam fx_t C_R     = fx_const(R);
  localparam fx_t C_SIGMA = fx_const(SIGMA);
  localparam fx_t C_TENTH = fx_const(0.1);
  // 1 / (g l) of the Bode approximation, to preset a filter to a given output.
  localparam fx_t C_INVGL = fx_const(1.0 / (2.2675 * 278.2968));

  fx_t xd [4];
  fx_t th [4];
  fx_t v  [4];

  delay_line #(.LANES(4), .DEPTH(DEPTH)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .init (x0),
    .step (step),
    .din  (x),
    .dout (xd),
    .full (hist_full)
  );

  always_comb begin
    fx[0] = fx_mul(C_A, x[1] - x[0]);
    fx[1] = fx_mul(C_B, x[0]) - fx_mul(C_D, fx_mul(x[0], x[2])) + x[3];
    fx[2] = fx_mul(C_H, fx_mul(x[0], x[0])) - fx_mul(C_C, x[2]) + x[3];
    fx[3] = -fx_mul(C_R, x[1]);
    for (int i = 0; i < 4; i++)
      v[i] = fx[i] - fx_mul(C_SIGMA, x[i]) + fx_mul(C_TENTH, th[i]);
  end

  for (genvar i = 0; i < 4; i++) begin : g_state
    fx_t z0 [3];
    assign z0[0] = fx_mul(C_INVGL, x0[i]);
    assign z0[1] = FX_ZERO;
    assign z0[2] = FX_ZERO;

    tanh_pwl u_tanh (.a(xd[i]), .y(th[i]));

    frac_integrator #(.DT(DT)) u_int (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load),
      .z0   (z0),
      .step (step),
      .v    (v[i]),
      .x    (x[i]),
      .z    ()
    );
  end

endmodule
