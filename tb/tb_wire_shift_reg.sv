// tb_wire_shift_reg: collects three wire patterns in one drift interval,
// loads them at the end and shifts the OR of them out MSB first; checks that
// ser_in shifts in behind, and that the buffer starts empty in the next interval.
`timescale 1ns/1ps
module tb_wire_shift_reg;
  logic clk = 0, rst_n = 0;
  logic capture = 0, load = 0, sod = 0, clr = 0, shift = 0, ser_in = 0, ser_out;
  logic [7:0] pattern = 0;
  logic [7:0] got;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  wire_shift_reg dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic pulse_capture(input logic [7:0] p);
    @(posedge clk); capture = 1; pattern = p;
    @(posedge clk); capture = 0; pattern = 8'hFF;   // pattern only counts with capture
  endtask

  task automatic shift_out(output logic [7:0] v, input logic fill);
    for (int i = 7; i >= 0; i--) begin
      v[i] = ser_out;
      @(posedge clk); shift = 1; ser_in = fill;
      @(posedge clk); shift = 0;
      #1;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); sod = 1; @(posedge clk); sod = 0;
    pulse_capture(8'h01);
    pulse_capture(8'h40);
    pulse_capture(8'h41);
    pulse_capture(8'h08);
    @(posedge clk); load = 1; @(posedge clk); load = 0; #1;
    shift_out(got, 1'b1);
    check(got == 8'h49, $sformatf("pattern shifted out %h, expected 49", got));
    shift_out(got, 1'b0);
    check(got == 8'hFF, $sformatf("ser_in shifted through %h", got));
    // next interval starts empty
    @(posedge clk); sod = 1; @(posedge clk); sod = 0;
    pulse_capture(8'h80);
    @(posedge clk); load = 1; @(posedge clk); load = 0; #1;
    shift_out(got, 1'b0);
    check(got == 8'h80, $sformatf("second interval %h, expected 80", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
