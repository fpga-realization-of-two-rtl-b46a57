// tb_run_ctrl: checks the trigger sequencing. While trigger is non-zero (11, 10, 01)
// load is high and step low; two clocks after trigger reads 00 load drops and step
// rises, one step per clock, and step_count counts them; a non-zero trigger holds
// and clears the count again.
`timescale 1ns/1ps
module tb_run_ctrl;
  logic        clk = 0, rst_n = 0;
  logic [1:0]  trigger = 2'b10;
  logic        load, step;
  logic [31:0] step_count;
  int          checks = 0, failures = 0;

  run_ctrl dut (.clk, .rst_n, .trigger, .load, .step, .step_count);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int lat;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 1; t < 4; t++) begin
      trigger = 2'(t);
      repeat (4) @(negedge clk);
      check("hold: load", load == 1'b1);
      check("hold: no step", step == 1'b0);
      check("hold: count clear", step_count == 0);
    end
    // Start: count clocks until step rises.
    trigger = 2'b00;
    lat = 0;
    while (!step && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    check("start latency is 3 clocks", lat == 3);
    check("load low while running", load == 1'b0);
    repeat (100) begin
      @(negedge clk);
      check("one step per clock", step == 1'b1 && load == 1'b0);
    end
    check("100 steps counted", step_count == 100);
    trigger = 2'b10;
    repeat (4) @(negedge clk);
    check("re-armed", load == 1'b1 && step == 1'b0 && step_count == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
