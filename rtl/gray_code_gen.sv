// gray_code_gen: drift-time code generator with end-of-drift signal.
//
// A start request t_start (the beam-crossing pulse) is synchronized to the free
// running clock; from the next clock edge on a 9-bit binary counter advances one
// count per 4 ns tick. Its low 8 bits, B0..B7, are turned into the Gray code
// G0..G7 that every DTD latches as the hit time, so the code spans 256 x 4 ns =
// 1024 ns. When the 9th bit sets (t_end) the end-of-drift flip-flop is reset:
// eod goes high, which inhibits all DTDs, and a one-tick clear returns the
// counter and the synchronizer to rest. CAMAC clear does the same. eod is the
// flip-flop's inverted output, so it is high outside the drift interval and low
// during it. lsb (B0) goes to the phase detector, which measures the offset
// between t_start and the first code edge.
//
// From the original design: the structure (synchronizer, binary counter, converter,
// S-R flip-flop giving EOD, one-shot clear ORed with CAMAC clear), 8 code bits,
// 4 ns least count. This design's choices: t_end is the counter's 9th bit (the
// original does so in the test generator), the flip-flop is set by the
// synchronized start rather than by t_start itself, and B0 is a counter bit of
// a 250 MHz clock instead of the gated 125 MHz clock.
//
// Timing: eod falls with run; gray is 0 in the first drift tick and advances
// one count per tick; gray = 0 and eod = 1 at rest.
module gray_code_gen
  import dtd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 t_start,    // beam crossing, asynchronous
  input  logic                 camac_clr,  // CAMAC clear, one tick
  output logic [TIME_BITS-1:0] gray,       // G0..G7 to the crate fanout
  output logic                 eod,        // end of drift: high outside the drift interval
  output logic                 lsb         // B0, to the phase detector
);
  logic                run;
  logic [CNT_BITS-1:0] cnt;
  logic                t_end;
  logic                clr;

  assign t_end = cnt[CNT_BITS-1];
  assign clr   = t_end || camac_clr;   // one-shot at end of code, or CAMAC clear

  start_sync u_sync (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_in (t_start),
    .clr      (clr),
    .run      (run)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clr) cnt <= '0;
    else if (run)      cnt <= cnt + 1'b1;
  end

  // The run flip-flop is set at start and reset at t_end: it is the S-R
  // flip-flop of the end-of-drift signal, and eod is its inverted output.
  assign eod = ~run | t_end;

  gray_encode #(.WIDTH(TIME_BITS)) u_g2b (
    .bin  (cnt[TIME_BITS-1:0]),
    .gray (gray)
  );

  // cnt[0] also resets the phase detector's flip-flop asynchronously; that
  // flip-flop measures the asynchronous start, so the mixed use is intended.
  assign lsb = cnt[0];
endmodule
