// gray_encode: combinational binary-to-Gray-code converter.
//
// g = b xor (b >> 1). Adjacent binary counts map to codes that differ in one bit,
// so a code latched while it is changing is wrong by at most one count. It is
// used by the drift-time code generator, by the test generator's running code,
// and between the CAMAC write lines and the test generator's memory. Purely
// combinational, no clock.
module gray_encode #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] bin,
  output logic [WIDTH-1:0] gray
);
  assign gray = bin ^ (bin >> 1);
endmodule
