// tb_dtd: one digitizer module end to end. CAMAC Z.S2 initializes it and
// F(16) disables wire 3; during a drift interval wires are hit alone, 8 ns
// apart and 12 ns apart, and wire 3 is hit too. After the end of drift the
// host reads with F(0) in stop mode until Q = 0; the words must be the hits'
// wire patterns with the Gray code of their ticks (the 12 ns case one memory
// cycle later), in order, and wire 3 must not appear. The trigger shift
// register must then shift out the OR of all hit wires.
`timescale 1ns/1ps
module tb_dtd;
  import dtd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] hit = 0;
  logic [7:0] gray_in = 0;
  logic eod = 1;
  logic n = 0, s1 = 0, s2 = 0, z = 0, shift = 0, ser_in = 0;
  logic [3:0] a = 0;
  logic [4:0] f = 0;
  logic [7:0] w = 0;
  logic [15:0] r;
  logic x, q, ser_out, busy, lost, flag_write;

  int checks = 0, failures = 0;
  int cnt = 0;
  int timer [8];
  bit restart = 0;

  always #2 clk = ~clk;

  dtd dut (.*);

  function automatic logic [7:0] g(input int c);
    logic [7:0] b;
    b = c[7:0];
    return b ^ {1'b0, b[7:1]};
  endfunction

  always @(negedge clk) begin
    if (restart) begin cnt = 0; restart = 0; end
    else cnt++;
    gray_in <= g(cnt);
    for (int i = 0; i < 8; i++) begin
      if (timer[i] > 0) timer[i]--;
      hit[i] <= (timer[i] > 0);
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic at(input int c);
    @(posedge clk);
    while (cnt != c - 1) @(posedge clk);
  endtask

  // CAMAC cycle; returns R and Q sampled during S1
  task automatic cycle(input logic [4:0] ff, input logic [7:0] ww, output logic [15:0] rr, output logic qq);
    @(negedge clk); n = 1; a = 0; f = ff; w = ww;
    repeat (2) @(negedge clk); s1 = 1;
    #1 rr = r; qq = q;
    check(x == 1, "X");
    repeat (3) @(negedge clk); s1 = 0;
    repeat (2) @(negedge clk); s2 = 1;
    repeat (3) @(negedge clk); s2 = 0;
    repeat (2) @(negedge clk); n = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rr;
    logic qq;
    logic [15:0] expect_words [4];
    logic [7:0] pat;
    int nw;
    for (int i = 0; i < 8; i++) timer[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialize, then disable wire 3
    @(negedge clk); z = 1;
    repeat (2) @(negedge clk); s2 = 1;
    repeat (2) @(negedge clk); s2 = 0; z = 0;
    cycle(F_WRITE_LATCH, 8'h08, rr, qq);

    @(posedge clk); restart = 1; eod = 0;
    at(10); timer[0] = 11;
    at(20); timer[3] = 11;
    at(40); timer[1] = 11;
    at(42); timer[2] = 11;
    at(80); timer[5] = 11;
    at(83); timer[7] = 11;
    at(150); eod = 1;
    repeat (4) @(posedge clk);

    expect_words = '{{8'h01, g(10)}, {8'h06, g(40)}, {8'h20, g(80)}, {8'h80, g(88)}};
    nw = 0;
    qq = 1;
    while (qq && nw < 20) begin
      cycle(F_READ_MEM, 0, rr, qq);
      if (qq) begin
        if (nw < 4) check(rr == expect_words[nw], $sformatf("word %0d = %h, expected %h", nw, rr, expect_words[nw]));
        nw++;
      end else begin
        check(rr[15:8] == 8'h00, "Q=0 on the flag word");
      end
    end
    check(nw == 4, $sformatf("%0d data words, expected 4", nw));

    // trigger shift register
    for (int i = 7; i >= 0; i--) begin
      pat[i] = ser_out;
      @(posedge clk); shift = 1;
      @(posedge clk); shift = 0;
      #1;
    end
    check(pat == 8'hA7, $sformatf("shifted pattern %h, expected a7", pat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
