// start_sync: synchronizer that starts a running code on the clock.
//
// The start request (beam-crossing t_start, or the CAMAC EXECUTE command of the
// test generator) is not aligned to the free-running clock. It passes two
// flip-flops; its rising edge at the second stage sets `run`, which gates the
// clock into the binary counter, so the code starts on a clock edge 2-3 ticks
// after the request. `clr` (end of the code, or CAMAC clear) drops `run`; the
// stages keep sampling, so only a new rising edge of the request restarts.
// The original has the two synchronizing flip-flops (2 x 1670); the edge
// detection is this design's choice, so that a request that is still high
// when the code ends does not restart it.
module start_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic start_in,  // asynchronous start request, active high
  input  logic clr,       // synchronous clear
  output logic run        // high while the code runs
);
  logic s1, s2, s3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1  <= 1'b0;
      s2  <= 1'b0;
      s3  <= 1'b0;
      run <= 1'b0;
    end else begin
      s1 <= start_in;
      s2 <= s1;
      s3 <= s2;
      if (clr)             run <= 1'b0;
      else if (s2 && !s3)  run <= 1'b1;
    end
  end
endmodule
