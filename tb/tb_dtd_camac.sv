// tb_dtd_camac: CAMAC cycles on one DTD interface. Checks F(0) read data,
// X, Q = 1 on a data word and 0 on the flag word, the MAR step at S2 only,
// no response without the station line or with another subaddress, F(16)
// loading the TEST LATCH at S1, and Z.S2 clearing it.
`timescale 1ns/1ps
module tb_dtd_camac;
  import dtd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic n = 0, s1 = 0, s2 = 0, z = 0;
  logic [3:0] a = 0;
  logic [4:0] f = 0;
  logic [7:0] w = 0;
  dtd_word_t rdata;
  logic [15:0] r;
  logic x, q, rd_inc, camac_clr;
  logic [7:0] test_latch;
  int checks = 0, failures = 0, n_inc = 0, n_clr = 0;

  always #2 clk = ~clk;

  dtd_camac dut (.*);

  always @(posedge clk) begin
    if (rd_inc) n_inc++;
    if (camac_clr) n_clr++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one CAMAC cycle: S1 then S2, each several ticks long
  task automatic cycle(input logic nn, input logic [3:0] aa, input logic [4:0] ff, input logic [7:0] ww);
    @(negedge clk); n = nn; a = aa; f = ff; w = ww;
    repeat (3) @(negedge clk); s1 = 1;
    repeat (5) @(negedge clk); s1 = 0;
    repeat (3) @(negedge clk); s2 = 1;
    repeat (5) @(negedge clk); s2 = 0;
    repeat (3) @(negedge clk); n = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rdata = '{wires: 8'h24, time_g: 8'h5a};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // read of a data word
    @(posedge clk); n = 1; a = 0; f = F_READ_MEM;
    #1;
    check(r == 16'h245a, "R carries the word");
    check(x == 1 && q == 1, "X=1, Q=1 on data");
    n = 0;
    cycle(1, 0, F_READ_MEM, 0);
    check(n_inc == 1, $sformatf("one MAR step per read, got %0d", n_inc));
    // flag word
    rdata = '{wires: 8'h00, time_g: 8'h33};
    @(posedge clk); n = 1; f = F_READ_MEM; #1;
    check(x == 1 && q == 0, "Q=0 on the flag word");
    n = 0; #1;
    check(r == 16'h0000 && x == 0 && q == 0, "silent when not addressed");
    // wrong subaddress / no station
    cycle(1, 4'd3, F_READ_MEM, 0);
    cycle(0, 4'd0, F_READ_MEM, 0);
    check(n_inc == 1, "no step without N or with A != 0");
    // TEST LATCH
    cycle(1, 0, F_WRITE_LATCH, 8'hA5);
    check(test_latch == 8'hA5, "F(16) loads the TEST LATCH");
    cycle(0, 0, F_WRITE_LATCH, 8'hFF);
    check(test_latch == 8'hA5, "F(16) needs N");
    // Z.S2
    z = 1;
    repeat (3) @(negedge clk); s2 = 1;
    repeat (3) @(negedge clk); s2 = 0; z = 0;
    @(negedge clk);
    check(n_clr == 1, "Z.S2 gives one clear pulse");
    check(test_latch == 8'h00, "Z clears the TEST LATCH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
