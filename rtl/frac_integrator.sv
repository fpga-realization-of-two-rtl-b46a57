// frac_integrator: fractional-order integrator 1/s^0.9 built from the Bode-domain
// approximation
//
//     1/s^0.9 ~ g (s^2 + k s + l) / (s^3 + m s^2 + n s + p)
//     g = 2.2675, k = 216.692, l = 278.2968, m = 361.567, n = 778.819, p = 10,
//
// realised in controllable canonical form with three states and discretised by the
// forward Euler rule y(t+1) = y(t) + f(y(t)) dt:
//
//     z1' = z2,  z2' = z3,  z3' = -p z1 - n z2 - m z3 + v,  x = g (l z1 + k z2 + z3).
//
// So D^0.9 x = v, and a fractional-order system is obtained by feeding v with the
// right-hand side of the fractional equation. The coefficients and the Euler rule
// are the published design's; the Q32.32 fixed-point arithmetic (see fx_pkg) is this
// design's.
//
// Interface and timing: x and z are combinational from the state registers. On a
// clock edge with load = 1 the states take z0 (load wins over step); with step = 1
// they advance one Euler step using the v present in that cycle. Synchronous
// active-low reset clears the states.
module frac_integrator
  import fx_pkg::*;
#(
  parameter real G  = 2.2675,
  parameter real K  = 216.692,
  parameter real L  = 278.2968,
  parameter real M  = 361.567,
  parameter real N  = 778.819,
  parameter real P  = 10.0,
  parameter real DT = 0.0005
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  fx_t  z0 [3],
  input  logic step,
  input  fx_t  v,
  output fx_t  x,
  output fx_t  z  [3]
);

  localparam fx_t C_G  = fx_const(G);
  localparam fx_t C_K  = fx_const(K);
  localparam fx_t C_L  = fx_const(L);
  localparam fx_t C_M  = fx_const(M);
  localparam fx_t C_N  = fx_const(N);
  localparam fx_t C_P  = fx_const(P);
  localparam fx_t C_DT = fx_const(DT);

  fx_t z1, z2, z3;
  fx_t dz3;

  always_comb begin
    dz3 = v - fx_mul(C_P, z1) - fx_mul(C_N, z2) - fx_mul(C_M, z3);
    x   = fx_mul(C_G, fx_mul(C_L, z1) + fx_mul(C_K, z2) + z3);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z1 <= '0;
      z2 <= '0;
      z3 <= '0;
    end else if (load) begin
      z1 <= z0[0];
      z2 <= z0[1];
      z3 <= z0[2];
    end else if (step) begin
      z1 <= z1 + fx_mul(z2, C_DT);
      z2 <= z2 + fx_mul(z3, C_DT);
      z3 <= z3 + fx_mul(dz3, C_DT);
    end
  end

  assign z[0] = z1;
  assign z[1] = z2;
  assign z[2] = z3;

endmodule
