// tb_gray_code_gen: starts the code with t_start at an arbitrary phase and
// checks: eod falls 2-4 ticks later; the code is the Gray code of 0, 1, 2 ...
// one count per tick; eod stays low for exactly 256 ticks (1024 ns) and the
// code returns to 0; CAMAC clear stops a running code.
`timescale 1ns/1ps
module tb_gray_code_gen;
  import dtd_pkg::*;

  logic clk = 0, rst_n = 0, t_start = 0, camac_clr = 0;
  logic [7:0] gray;
  logic eod, lsb;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  gray_code_gen dut (.*);

  function automatic logic [7:0] ref_gray(input int c);
    logic [7:0] b, gg;
    b = c[7:0];
    gg[7] = b[7];
    for (int i = 0; i < 7; i++) gg[i] = b[i] ^ b[i+1];
    return gg;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, len, bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #0.5;
    check(eod == 1 && gray == 0, "rest: eod high, code 0");
    #1.3 t_start = 1;
    fork
      #30 t_start = 0;
    join_none
    lat = 0;
    @(posedge clk); #0.5;
    while (eod) begin
      @(posedge clk); #0.5; lat++;
    end
    check(lat >= 1 && lat <= 4, $sformatf("start latency %0d ticks", lat));
    len = 0; bad = 0;
    while (!eod && len < 400) begin
      if (gray != ref_gray(len)) bad++;
      @(posedge clk); #0.5; len++;
    end
    check(bad == 0, $sformatf("%0d wrong codes", bad));
    check(len == 256, $sformatf("drift interval %0d ticks, expected 256", len));
    @(posedge clk); #0.5;
    check(gray == 0 && eod == 1, "back at rest");
    // clear stops the code
    t_start = 1; #20 t_start = 0;
    repeat (20) @(posedge clk);
    #0.5 check(eod == 0, "running again");
    camac_clr = 1; @(posedge clk); #0.5 camac_clr = 0;
    check(eod == 1 && gray == 0, "CAMAC clear stops the code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
