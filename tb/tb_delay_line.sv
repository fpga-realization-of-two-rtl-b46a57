// tb_delay_line: pushes a numbered sequence through the delay line and checks that
// the output is the initial value for the first DEPTH steps and afterwards exactly
// the sample written DEPTH steps earlier, on all lanes; that 'full' rises after
// DEPTH steps; that a step-less cycle changes nothing; and that load restarts the
// history. Run at the default DEPTH = 20 and at DEPTH = 7.
`timescale 1ns/1ps
module tb_delay_line;
  import fx_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  fx_t  init [4];
  fx_t  din_a [4], din_b [4];
  fx_t  dout_a [4], dout_b [4];
  logic full_a, full_b;
  int   checks = 0, failures = 0;

  delay_line                       dut_a (.clk, .rst_n, .load, .init, .step, .din(din_a), .dout(dout_a), .full(full_a));
  delay_line #(.LANES(4), .DEPTH(7)) dut_b (.clk, .rst_n, .load, .init, .step, .din(din_b), .dout(dout_b), .full(full_b));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t sample(int s, int lane);
    return fx_t'((longint'(s) << 32) + longint'(lane) * 1000 - 77);
  endfunction

  task automatic expect_out(int s, int depth, fx_t dout [4], logic full);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (dout[i] != ((s < depth) ? init[i] : sample(s - depth, i))) begin
        failures++;
        $display("FAIL depth %0d step %0d lane %0d: %h", depth, s, i, dout[i]);
      end
    end
    checks++;
    if (full != (s >= depth)) begin
      failures++;
      $display("FAIL full flag depth %0d step %0d", depth, s);
    end
  endtask

  task automatic run(int nsteps);
    for (int s = 0; s < nsteps; s++) begin
      for (int i = 0; i < 4; i++) begin
        din_a[i] = sample(s, i);
        din_b[i] = sample(s, i);
      end
      #1;
      expect_out(s, 20, dout_a, full_a);
      expect_out(s, 7, dout_b, full_b);
      step = 1;
      @(negedge clk);
      step = 0;
      if (s == 30) begin
        // A cycle without step must not advance anything.
        @(negedge clk);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) init[i] = fx_const(1.5 * real'(i) - 2.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    run(60);
    // Restart: the history goes back to the initial value.
    for (int i = 0; i < 4; i++) init[i] = fx_const(0.25 * real'(i));
    load = 1;
    @(negedge clk); load = 0;
    run(45);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
