// fotd_sync: drive/response pair of fractional-order time-delay systems with the
// fixed-time or predefined-time synchronization controller between them.
//
// The drive (fotd_drive) runs freely from x0. The controller (sync_controller) reads
// both systems' states and coupling terms and returns u_a and K; the response
// (fotd_response), started from y0, is steered onto the drive so that e = y - x goes
// to zero. Drive, response and controller share the step strobe, so all three move in
// lock-step, one Euler step (dt = 0.0005) per strobe. The wiring follows the
// published drive-response-controller arrangement.
//
// Interface and timing: e, x and y are combinational from the state registers and
// show the result of the last completed step. load (synchronous, held while the
// external trigger says so) presets both systems. mode: 0 fixed-time law, 1
// predefined-time law; inv_tc = 1/Tc in Q32.32 (used in predefined-time mode only).
module fotd_sync
  import fx_pkg::*;
#(
  parameter int unsigned DEPTH = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic step,
  input  logic mode,
  input  fx_t  inv_tc,
  input  fx_t  x0 [4],
  input  fx_t  y0 [4],
  output fx_t  x  [4],
  output fx_t  y  [4],
  output fx_t  e  [4],
  output logic hist_full
);

  fx_t fx  [4];
  fx_t fy  [4];
  fx_t u_a [4];
  fx_t kc  [4];

  fotd_drive #(.DEPTH(DEPTH)) u_drive (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .step     (step),
    .x0       (x0),
    .x        (x),
    .fx       (fx),
    .hist_full(hist_full)
  );

  sync_controller u_ctrl (
    .mode  (mode),
    .inv_tc(inv_tc),
    .x     (x),
    .y     (y),
    .fx    (fx),
    .fy    (fy),
    .e     (e),
    .u_a   (u_a),
    .kc    (kc)
  );

  fotd_response #(.DEPTH(DEPTH)) u_resp (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .step (step),
    .y0   (y0),
    .u_a  (u_a),
    .kc   (kc),
    .y    (y),
    .fy   (fy)
  );

endmodule
