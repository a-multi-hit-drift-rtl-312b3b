// tb_ram16: writes random words to all 16 locations of a 16 x 16 memory,
// then reads them back asynchronously and compares with a model array; also
// checks that a write with we low changes nothing.
`timescale 1ns/1ps
module tb_ram16;
  logic clk = 0, we;
  logic [3:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  ram16 #(.WIDTH(16), .DEPTH(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; waddr = i[3:0]; wdata = 16'($urandom);
      model[i] = wdata;
    end
    @(negedge clk);
    we = 0; waddr = 4'd5; wdata = ~model[5];
    @(negedge clk);
    for (int i = 15; i >= 0; i--) begin
      raddr = i[3:0];
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL addr %0d read %h expected %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
