// tb_start_sync: a start request sets run 2 to 3 ticks later; clear drops
// it; a request held high across a clear does not restart; a new edge does.
`timescale 1ns/1ps
module tb_start_sync;
  logic clk = 0, rst_n = 0, start_in = 0, clr = 0, run;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  start_sync dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(run == 0, "idle after reset");
    #1 start_in = 1;
    lat = 0;
    while (!run && lat < 10) begin
      @(posedge clk); #0.5; lat++;
    end
    check(lat >= 2 && lat <= 3, $sformatf("latency %0d ticks", lat));
    repeat (5) @(posedge clk);
    #0.5 check(run == 1, "run stays high");
    clr = 1; @(posedge clk); #0.5 clr = 0;
    check(run == 0, "clear drops run");
    repeat (6) @(posedge clk);
    #0.5 check(run == 0, "held request does not restart");
    start_in = 0;
    repeat (4) @(posedge clk);
    #0.5 start_in = 1;
    repeat (4) @(posedge clk);
    #0.5 check(run == 1, "new edge restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
