// tb_gray_encode: exhaustive check of the 8-bit binary-to-Gray converter.
// Every input is compared with a reference built bit by bit (g[i] = b[i] xor
// b[i+1], top bit unchanged), and consecutive codes must differ in one bit.
`timescale 1ns/1ps
module tb_gray_encode;
  logic [7:0] bin, gray, prev;
  int checks = 0, failures = 0;

  gray_encode #(.WIDTH(8)) dut (.bin(bin), .gray(gray));

  function automatic logic [7:0] ref_gray(input logic [7:0] b);
    logic [7:0] g;
    g[7] = b[7];
    for (int i = 0; i < 7; i++) g[i] = b[i] ^ b[i+1];
    return g;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = 8'h00;
    for (int v = 0; v < 256; v++) begin
      bin = v[7:0];
      #1;
      checks++;
      if (gray !== ref_gray(bin)) begin
        failures++;
        $display("FAIL bin=%0d gray=%h expected %h", bin, gray, ref_gray(bin));
      end
      if (v > 0) begin
        checks++;
        if ($countones(gray ^ prev) != 1) begin
          failures++;
          $display("FAIL codes %h and %h differ in more than one bit", prev, gray);
        end
      end
      prev = gray;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
