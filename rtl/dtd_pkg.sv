// dtd_pkg: types and constants shared by the drift-time digitizer system.
//
// All timing in this design is counted in ticks of one clock, clk. One tick is
// 4 ns, the least count of the drift-time code: the 125 MHz crystal clock has
// an 8 ns period and its two halves are the two states of the code's least
// significant bit, so a single 250 MHz clock whose count's LSB toggles every
// tick produces the same 8-bit code. The word layout (wire pattern in the upper
// byte, Gray-coded time in the lower byte), the 16-word memories, the 8-bit code
// and the CAMAC function numbers of the test generator follow the original design; the
// tick counts of the DTD memory cycle and the DTD's CAMAC function numbers are
// this design's choices.
package dtd_pkg;

  // Drift-time code
  localparam int unsigned TIME_BITS = 8;        // G0..G7, 4 ns per count
  localparam int unsigned CNT_BITS  = TIME_BITS + 1; // 9th bit ends the code

  // DTD memory word: wire pattern above, Gray-coded time below
  typedef struct packed {
    logic [7:0] wires;   // one bit per input channel; all zero in the flag word
    logic [7:0] time_g;  // drift time, Gray code, 4 ns per count
  } dtd_word_t;

  // DTD memory cycle, in 4 ns ticks, counted from the tick after the first hit
  localparam int unsigned CYCLE_TICKS = 8;  // about 32 ns per memory cycle
  localparam int unsigned CAPTURE_AT  = 1;  // wire pattern latched: hits 0..8 ns after the first share its word
  localparam int unsigned WRITE_AT    = 3;  // memory write at the end of the 8 ns WRITE pulse

  // CAMAC function codes
  localparam logic [4:0] F_READ_MEM    = 5'd0;   // DTD: read word at MAR, MAR+1 at S2
  localparam logic [4:0] F_WRITE_LATCH = 5'd16;  // DTD: load TEST LATCH from W1-W8 at S1
  localparam logic [4:0] F_TG_CLEAR    = 5'd11;  // test generator: clear at S2
  localparam logic [4:0] F_TG_LOAD     = 5'd17;  // test generator: write word at S1, MAR+1 at S2
  localparam logic [4:0] F_TG_EXECUTE  = 5'd25;  // test generator: start the pulse train at S1

endpackage
