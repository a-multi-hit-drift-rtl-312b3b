// tb_test_generator: loads 16 pulse times over CAMAC (F(17)), starts the
// code (F(25)) and checks that each pulse on both outputs rises t+1 ticks
// after TEST MODE for each loaded time t, lasts PULSE_TICKS ticks, that TEST
// MODE lasts 256 ticks (the 9th counter bit), that the delayed crossing rises
// 193 ticks after TEST MODE (B6 edge with B7 set) and clears at the end, and
// that F(11) clears the MAR so the same train can be run again.
`timescale 1ns/1ps
module tb_test_generator;
  import dtd_pkg::*;

  localparam int PT = 4;
  logic clk = 0, rst_n = 0;
  logic n = 0, s1 = 0, s2 = 0, z = 0;
  logic [3:0] a = 0;
  logic [4:0] f = 0;
  logic [7:0] w = 0;
  logic x, q, pulse_north, pulse_south, test_mode, delayed_xing;
  int checks = 0, failures = 0;
  int times [16] = '{3, 10, 20, 30, 40, 50, 60, 70, 100, 120, 150, 180, 200, 220, 240, 250};

  always #2 clk = ~clk;

  test_generator #(.PULSE_TICKS(PT)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycle(input logic [4:0] ff, input logic [7:0] ww);
    @(negedge clk); n = 1; a = 0; f = ff; w = ww;
    repeat (2) @(negedge clk); s1 = 1;
    #1 check(x == 1 && q == 1, $sformatf("X and Q for F(%0d)", ff));
    repeat (3) @(negedge clk); s1 = 0;
    repeat (2) @(negedge clk); s2 = 1;
    repeat (3) @(negedge clk); s2 = 0;
    repeat (2) @(negedge clk); n = 0;
  endtask

  task automatic run_train();
    int t, k, width, xing_at;
    logic prev;
    fork
      cycle(F_TG_EXECUTE, 0);
    join_none
    @(posedge clk); #0.5;
    while (!test_mode) begin @(posedge clk); #0.5; end
    t = 0; k = 0; width = 0; prev = 0; xing_at = -1;
    while (test_mode && t < 400) begin
      check(pulse_north == pulse_south, "north and south equal");
      if (pulse_north && !prev) begin
        if (k < 16) check(t == times[k] + 1, $sformatf("pulse %0d at %0d, expected %0d", k, t, times[k] + 1));
        k++;
        width = 0;
      end
      if (pulse_north) width++;
      if (!pulse_north && prev) check(width == PT, $sformatf("pulse width %0d", width));
      if (delayed_xing && xing_at < 0) xing_at = t;
      prev = pulse_north;
      @(posedge clk); #0.5; t++;
    end
    check(k == 16, $sformatf("%0d pulses, expected 16", k));
    check(t == 256, $sformatf("TEST MODE for %0d ticks, expected 256", t));
    check(xing_at == 193, $sformatf("delayed crossing at %0d, expected 193", xing_at));
    @(posedge clk); #0.5;
    check(!delayed_xing, "delayed crossing cleared at the end");
    wait fork;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    cycle(F_TG_CLEAR, 0);
    for (int i = 0; i < 16; i++) cycle(F_TG_LOAD, times[i][7:0]);
    // not addressed: no X
    @(posedge clk); n = 0; f = F_TG_LOAD; #1;
    check(x == 0 && q == 0, "no X without N");
    run_train();
    cycle(F_TG_CLEAR, 0);
    run_train();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
