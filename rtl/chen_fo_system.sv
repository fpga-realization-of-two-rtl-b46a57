// chen_fo_system: fractional-order Chen chaotic system of order 0.9,
//
//     D^0.9 x1 = a (x2 - x1)
//     D^0.9 x2 = -x1 x3 + c x2 + (c - a) x1        (a = 35, b = 3, c = 28)
//     D^0.9 x3 = -b x3 + x1 x2
//
// Each state is the output of a frac_integrator (third-order Bode approximation of
// 1/s^0.9), so the system is the nine-state first-order system of the published
// design, stepped with forward Euler. The linear part matches its nine equations
// term by term. The nonlinear terms are formed here as the products of the
// approximated states (x1*x3 and x1*x2) and fed into the same filter chains; this is
// this design's reading, chosen because it keeps the attractor bounded
// (x1 in about -21..26, x2 -24..31, x3 3..44). The nine filter states start at the
// published initial vector [0,0,2, 0,0,1, 0,0,3].
//
// Interface and timing: load (synchronous) restores the initial vector, step advances
// one Euler step per clock in which it is high; x and z are combinational from the
// state registers, so x reflects the last completed step.
module chen_fo_system
  import fx_pkg::*;
#(
  parameter real A  = 35.0,
  parameter real B  = 3.0,
  parameter real C  = 28.0,
  parameter real DT = 0.0005
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic step,
  output fx_t  x [3],
  output fx_t  z [9]
);

  localparam fx_t C_A   = fx_const(A);
  localparam fx_t C_B   = fx_const(B);
  localparam fx_t C_C   = fx_const(C);
  localparam fx_t C_CMA = fx_const(C - A);

  // Initial filter states (z1, z2, z3) of the three chains.
  fx_t init [3][3];
  assign init[0] = '{FX_ZERO, FX_ZERO, fx_const(2.0)};
  assign init[1] = '{FX_ZERO, FX_ZERO, fx_const(1.0)};
  assign init[2] = '{FX_ZERO, FX_ZERO, fx_const(3.0)};

  fx_t v [3];

  always_comb begin
    v[0] = fx_mul(C_A, x[1] - x[0]);
    v[1] = -fx_mul(x[0], x[2]) + fx_mul(C_C, x[1]) + fx_mul(C_CMA, x[0]);
    v[2] = -fx_mul(C_B, x[2]) + fx_mul(x[0], x[1]);
  end

  for (genvar i = 0; i < 3; i++) begin : g_axis
    fx_t zi [3];
    frac_integrator #(.DT(DT)) u_int (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load),
      .z0   (init[i]),
      .step (step),
      .v    (v[i]),
      .x    (x[i]),
      .z    (zi)
    );
    assign z[3*i]   = zi[0];
    assign z[3*i+1] = zi[1];
    assign z[3*i+2] = zi[2];
  end

endmodule
