// fotd_response: response fractional-order time-delay system of order 0.9 with the
// synchronization control input,
//
//     D^a y1 = -s y1 + A1 (y2 - y1) + y4         + 0.1 tanh(y1(t-tau)) + u1
//     D^a y2 = -s y2 + B1 y1 - y2 - y1 y3        + 0.1 tanh(y2(t-tau)) + u2
//     D^a y3 = -s y3 + y1 y2 - C1 y3             + 0.1 tanh(y3(t-tau)) + u3
//     D^a y4 = -s y4 - y2 y3 - R1 y4             + 0.1 tanh(y4(t-tau)) + u4
//
// where the control is split as u_i = ua_i - D^(a-1) K_i. The part ua (sigma e - h(e)
// - sign(e) L) enters the right-hand side of the 1/s^0.9 integrator like any other
// term. For the part under D^(a-1) the operators combine: integrating D^(a-1) K with
// 1/s^a gives the ordinary integral of K. So each lane also has a plain Euler
// integrator w_i' = K_i, and the state is y_i = (filter output) - w_i. The equations
// and s = 0.1 follow the published design; the coefficients A1, B1, C1, R1, the delay length
// and the w-integrator realisation of D^(a-1) are this design's choices.
//
// Interface and timing: y and the coupling terms fy (all terms except -s y, tanh and
// u) are combinational from the state registers. load (synchronous) presets the
// filters to y0 and clears w; step advances one Euler step using ua and kc of that
// cycle.
module fotd_response
  import fx_pkg::*;
#(
  parameter real         A1    = 10.0,
  parameter real         B1    = 28.0,
  parameter real         C1    = 2.6667,
  parameter real         R1    = 1.0,
  parameter real         SIGMA = 0.1,
  parameter real         DT    = 0.0005,
  parameter int unsigned DEPTH = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic step,
  input  fx_t  y0  [4],
  input  fx_t  u_a [4],
  input  fx_t  kc  [4],
  output fx_t  y   [4],
  output fx_t  fy  [4]
);

  localparam fx_t C_A1    = fx_const(A1);
  localparam fx_t C_B1    = fx_const(B1);
  localparam fx_t C_C1    = fx_const(C1);
  localparam fx_t C_R1    = fx_const(R1);
  localparam fx_t C_SIGMA = fx_const(SIGMA);
  localparam fx_t C_TENTH = fx_const(0.1);
  localparam fx_t C_DT    = fx_const(DT);
  localparam fx_t C_INVGL = fx_const(1.0 / (2.2675 * 278.2968));

  fx_t yd [4];
  fx_t th [4];
  fx_t v  [4];
  fx_t yf [4];
  fx_t w  [4];
  logic hist_full_unused;

  delay_line #(.LANES(4), .DEPTH(DEPTH)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .init (y0),
    .step (step),
    .din  (y),
    .dout (yd),
    .full (hist_full_unused)
  );

  always_comb begin
    for (int i = 0; i < 4; i++) y[i] = yf[i] - w[i];
    fy[0] = fx_mul(C_A1, y[1] - y[0]) + y[3];
    fy[1] = fx_mul(C_B1, y[0]) - y[1] - fx_mul(y[0], y[2]);
    fy[2] = fx_mul(y[0], y[1]) - fx_mul(C_C1, y[2]);
    fy[3] = -fx_mul(y[1], y[2]) - fx_mul(C_R1, y[3]);
  end

  // Kept apart from the block above: u_a depends on fy through the controller.
  always_comb begin
    for (int i = 0; i < 4; i++)
      v[i] = fy[i] - fx_mul(C_SIGMA, y[i]) + fx_mul(C_TENTH, th[i]) + u_a[i];
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (!rst_n || load) w[i] <= '0;
      else if (step)      w[i] <= w[i] + fx_mul(kc[i], C_DT);
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_state
    fx_t z0 [3];
    assign z0[0] = fx_mul(C_INVGL, y0[i]);
    assign z0[1] = FX_ZERO;
    assign z0[2] = FX_ZERO;

    tanh_pwl u_tanh (.a(yd[i]), .y(th[i]));

    frac_integrator #(.DT(DT)) u_int (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load),
      .z0   (z0),
      .step (step),
      .v    (v[i]),
      .x    (yf[i]),
      .z    ()
    );
  end

endmodule
