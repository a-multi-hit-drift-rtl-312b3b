// tb_phase_detector: t_start at several phases relative to a 4 ns LSB clock;
// the output pulse must rise at t_start and fall at the next LSB rising edge,
// so its width equals the offset, between 0 and 8 ns.
`timescale 1ns/1ps
module tb_phase_detector;
  logic t_start = 0, lsb = 0, pd_out;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall, expected;

  phase_detector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // power-up state: one lsb pulse resets the flip-flop
    #1 lsb = 1; #1 lsb = 0;
    checks++;
    if (pd_out !== 1'b0) begin failures++; $display("FAIL not reset"); end
    for (int k = 0; k < 6; k++) begin
      real phase;
      phase = 0.7 + 1.3 * k;          // ns before the next LSB edge
      #20;
      t_start = 1; t_rise = $realtime;
      #0.1;
      checks++;
      if (pd_out !== 1'b1) begin failures++; $display("FAIL pulse not set"); end
      #(phase - 0.1);
      lsb = 1;
      #0.1;
      t_fall = $realtime - 0.1;
      checks++;
      if (pd_out !== 1'b0) begin failures++; $display("FAIL pulse not reset"); end
      expected = phase;
      checks++;
      if ((t_fall - t_rise) < expected - 0.01 || (t_fall - t_rise) > expected + 0.01) begin
        failures++;
        $display("FAIL width %0f expected %0f", t_fall - t_rise, expected);
      end
      // further LSB edges keep it low
      #4 lsb = 0; #4 lsb = 1; #0.1;
      checks++;
      if (pd_out !== 1'b0) begin failures++; $display("FAIL pulse came back"); end
      t_start = 0; lsb = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
