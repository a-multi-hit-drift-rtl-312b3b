// ram16: small random-access memory, 16 words by default.
//
// One write port, written at the clock edge when we is high, and an
// asynchronous read port, as in the ECL 10145 16 x 4 RAMs the original
// memories are built from. The DTD uses it as 16 x 16 (wire pattern and
// time), the test generator as 16 x 8 (pulse times). The contents are not
// reset: every word is written before it is read.
module ram16 #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
