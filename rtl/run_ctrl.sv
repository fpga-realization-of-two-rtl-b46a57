// run_ctrl: start control of the chaos generators from the external trigger.
//
// The systems evolve far faster than anything outside can watch, so their start is
// gated by an external trigger: while trigger is non-zero the systems are held at
// their initial conditions (load = 1); once it reads 0 they run, one Euler step per
// clock (step = 1), and step_count counts the steps taken since the start, so the
// simulated time is step_count * dt. Returning trigger to a non-zero value holds and
// re-arms the systems. The run-on-zero rule and the 2-bit trigger are the
// published design's; the two-flop synchronizer and one step per clock are this design's choices.
//
// Interface and timing: trigger is asynchronous; it reaches load/step on the third
// clock edge. load and step are registered and never high together. step_count
// saturates at its maximum.
module run_ctrl #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       trigger,
  output logic             load,
  output logic             step,
  output logic [CNT_W-1:0] step_count
);

  logic [1:0] sync1, sync2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync1      <= 2'b11;
      sync2      <= 2'b11;
      load       <= 1'b1;
      step       <= 1'b0;
      step_count <= '0;
    end else begin
      sync1 <= trigger;
      sync2 <= sync1;
      load  <= (sync2 != 2'b00);
      step  <= (sync2 == 2'b00);
      if (sync2 != 2'b00)
        step_count <= '0;
      else if (step && step_count != '1)
        step_count <= step_count + 1'b1;
    end
  end

  // The systems are either held or stepping, never both.
  a_load_step_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(load && step));

endmodule
