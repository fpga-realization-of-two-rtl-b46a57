// fo_chaos_top: fractional-order chaos on programmable logic, two designs under one
// trigger.
//
//  * chen_fo_system: the fractional-order (0.9) Chen chaotic oscillator, nine Euler-
//    stepped filter states, observed through three 12-bit probes x1..x3.
//  * fotd_sync: a drive and a response fractional-order time-delay system with a
//    fixed-time (mode = 0) or predefined-time (mode = 1, settling bound Tc = 1/inv_tc)
//    synchronization controller, observed through four 16-bit error probes e1..e4.
//
// run_ctrl turns the external 2-bit trigger into load (hold at the initial
// conditions x0/y0 and the Chen initial vector) and step (one Euler step, dt =
// 0.0005, per clock). The probes are where an on-chip logic analyser connects; they
// are registered once per step and flagged with probe_valid. Chen probes are signed
// with 5 fractional bits (+-64), error probes signed with 11 fractional bits (+-16),
// both saturating; the probe widths are the published design's, the binary points this
// design's. Full-precision states are also brought out.
//
// Timing: trigger to first step 3 clocks (synchronizer, then the step register).
// Probes lag the states by one clock.
module fo_chaos_top
  import fx_pkg::*;
#(
  parameter int unsigned DEPTH = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         trigger,
  input  logic               mode,
  input  fx_t                inv_tc,
  input  fx_t                x0 [4],
  input  fx_t                y0 [4],
  output logic signed [11:0] chen_probe [3],
  output logic signed [15:0] e_probe [4],
  output logic               probe_valid,
  output logic [31:0]        step_count,
  output fx_t                chen_x [3],
  output fx_t                sync_x [4],
  output fx_t                sync_y [4],
  output fx_t                sync_e [4],
  output logic               hist_full
);

  logic load, step;

  run_ctrl #(.CNT_W(32)) u_run (
    .clk       (clk),
    .rst_n     (rst_n),
    .trigger   (trigger),
    .load      (load),
    .step      (step),
    .step_count(step_count)
  );

  chen_fo_system u_chen (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .step (step),
    .x    (chen_x),
    .z    ()
  );

  fotd_sync #(.DEPTH(DEPTH)) u_sync (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .step     (step),
    .mode     (mode),
    .inv_tc   (inv_tc),
    .x0       (x0),
    .y0       (y0),
    .x        (sync_x),
    .y        (sync_y),
    .e        (sync_e),
    .hist_full(hist_full)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      probe_valid <= 1'b0;
      for (int i = 0; i < 3; i++) chen_probe[i] <= '0;
      for (int i = 0; i < 4; i++) e_probe[i]    <= '0;
    end else begin
      probe_valid <= step;
      if (step) begin
        for (int i = 0; i < 3; i++) chen_probe[i] <= 12'(fx_to_probe(chen_x[i], 12, 5));
        for (int i = 0; i < 4; i++) e_probe[i]    <= 16'(fx_to_probe(sync_e[i], 16, 11));
      end
    end
  end

endmodule
