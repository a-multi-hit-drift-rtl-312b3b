// phase_detector: start-offset flip-flop of the drift-time code generator.
//
// The code starts on the first clock edge after t_start, so the code's zero lags
// the true start by a different amount in every event. This flip-flop is set by
// the rising edge of t_start and reset by the first rising edge of the code's
// LSB: its output pulse lasts exactly that offset. In the original system the pulse
// makes a charge that an ADC records, and the offset is subtracted from every
// drift time of the event; the charge and the ADC are analog and outside this
// module, which delivers the pulse. pd_out is low at rest (lsb is low while the
// code is held at zero). Asynchronous by nature: t_start is the clock, lsb an
// asynchronous reset. The S-R structure follows the original; holding the
// output low while lsb is high is this design's choice.
module phase_detector (
  input  logic t_start,  // beam crossing (S)
  input  logic lsb,      // code LSB (R)
  output logic pd_out    // high from t_start to the first LSB edge
);
  always_ff @(posedge t_start or posedge lsb) begin
    if (lsb) pd_out <= 1'b0;
    else     pd_out <= 1'b1;
  end
endmodule
