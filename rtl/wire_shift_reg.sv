// wire_shift_reg: buffer flip-flops and shift register for the trigger.
//
// During a drift interval the buffer flip-flops collect every wire pattern the
// DTD latches, so at the end they show which of the eight wires were hit. When
// the drift interval ends (at END, once the last memory cycle is over) the
// pattern is loaded in parallel into an 8-bit shift register, from which the
// track-recognition logic shifts it out serially (shift, one bit per tick,
// MSB = wire 7 first; ser_in fills from the bottom so modules can be
// chained). The buffer clears when a new drift interval starts and on CAMAC
// clear. From the original design: buffer flip-flops, 8-bit shift register loaded at
// the end of drift, with SHIFT CLK, IN and OUT. This design's choices: loading
// at END rather than at the EOD edge, so that a memory cycle still running at
// EOD is included; the shift clock as a shift enable on clk; the bit order;
// the moments of clearing.
module wire_shift_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       capture,   // a wire pattern is latched
  input  logic [7:0] pattern,   // that pattern, valid with capture
  input  logic       load,      // end of drift (END): load
  input  logic       sod,       // start of drift: clear buffer
  input  logic       clr,       // CAMAC clear
  input  logic       shift,     // shift enable
  input  logic       ser_in,
  output logic       ser_out
);
  logic [7:0] buffer;   // buffer flip-flops
  logic [7:0] sreg;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      buffer <= 8'h00;
      sreg   <= 8'h00;
    end else begin
      if (sod)          buffer <= 8'h00;
      else if (capture) buffer <= buffer | pattern;

      if (load)         sreg <= buffer;
      else if (shift)   sreg <= {sreg[6:0], ser_in};
    end
  end

  assign ser_out = sreg[7];
endmodule
