// test_generator: programmable pulse-train generator for testing the chambers.
//
// The host loads 16 pulse times, in 4 ns counts, into a 16 x 8 memory; each
// word passes a binary-to-Gray converter on the way in, so the memory holds
// Gray codes. EXECUTE starts an 8-bit Gray code exactly like the drift-time
// code. A comparator matches the running code (A) with the word at the memory
// address register (B); on a match it fires a pulse on the two test outputs and
// advances the MAR, so that the next word is compared from then on. The 9th
// bit of the counter ends the code and clears counter, synchronizer and MAR.
// A flip-flop clocked by counter bit B6 samples B7 and gives a delayed
// beam-crossing signal, set 192 counts (768 ns) into the code.
//
// CAMAC (station line n, subaddress a, function f, strobes s1 and s2,
// initialize z, write lines w): F(17).S1 writes W1-W8 at the MAR and
// F(17).S2 advances it; F(25).S1 starts the code; F(11).S2 or Z.S2 clears.
// X and Q both answer any of F(11), F(17), F(25). The CAMAC lines are taken
// as synchronous to clk; strobes act on their rising edge.
//
// From the original design: the blocks and their connections, the Gray-coded memory,
// functions 11, 17 and 25, the 9th-bit end, the B6/B7 crossing flip-flop, the
// monotonic-times rule. This design's choices: subaddress A = 0 is required,
// the output pulse lasts PULSE_TICKS ticks from the last match, and the
// pulse train is gated by the running code (TEST MODE output).
//
// Timing: a word w fires the pulse in the tick the code equals Gray(w), i.e.
// w ticks after test_mode rises; the outputs go high one tick later.
module test_generator
  import dtd_pkg::*;
#(
  parameter int unsigned PULSE_TICKS = 4  // output pulse width, 4 ns each
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // CAMAC
  input  logic                 n,
  input  logic [3:0]           a,
  input  logic [4:0]           f,
  input  logic                 s1,
  input  logic                 s2,
  input  logic                 z,
  input  logic [7:0]           w,
  output logic                 x,
  output logic                 q,
  // outputs
  output logic                 pulse_north,
  output logic                 pulse_south,
  output logic                 test_mode,
  output logic                 delayed_xing
);
  // ---- CAMAC function decode (74154 decoder, A gate, strobes) ----
  logic s1_q, s2_q, s1_rise, s2_rise;
  logic sel, f11, f17, f25;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q <= 1'b0;
      s2_q <= 1'b0;
    end else begin
      s1_q <= s1;
      s2_q <= s2;
    end
  end
  assign s1_rise = s1 && !s1_q;
  assign s2_rise = s2 && !s2_q;

  assign sel = n && (a == 4'd0);
  assign f11 = sel && (f == F_TG_CLEAR);
  assign f17 = sel && (f == F_TG_LOAD);
  assign f25 = sel && (f == F_TG_EXECUTE);
  assign x   = f11 || f17 || f25;
  assign q   = x;

  // ---- running code ----
  logic                run;
  logic [CNT_BITS-1:0] cnt;
  logic                clr;
  logic                execute;
  logic [7:0]          code;

  assign execute = f25 && s1_rise;
  assign clr     = cnt[CNT_BITS-1] || ((f11 || z) && s2_rise);

  start_sync u_sync (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_in (execute),
    .clr      (clr),
    .run      (run)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clr) cnt <= '0;
    else if (run)      cnt <= cnt + 1'b1;
  end

  gray_encode #(.WIDTH(8)) u_code (
    .bin  (cnt[7:0]),
    .gray (code)
  );

  // ---- pulse-time memory, written in Gray code ----
  logic [3:0] mar;
  logic [7:0] w_gray, mem_q;
  logic       mem_we, fire;

  gray_encode #(.WIDTH(8)) u_wconv (
    .bin  (w),
    .gray (w_gray)
  );

  assign mem_we = f17 && s1_rise;

  ram16 #(.WIDTH(8), .DEPTH(16)) u_mem (
    .clk   (clk),
    .we    (mem_we),
    .waddr (mar),
    .wdata (w_gray),
    .raddr (mar),
    .rdata (mem_q)
  );

  // digital comparator A = B, gated by the running code
  assign fire = run && !cnt[CNT_BITS-1] && (code == mem_q);

  always_ff @(posedge clk) begin
    if (!rst_n || clr)              mar <= '0;
    else if (fire || (f17 && s2_rise)) mar <= mar + 1'b1;
  end

  // ---- output one-shot ----
  logic [$clog2(PULSE_TICKS+1)-1:0] pcount;

  always_ff @(posedge clk) begin
    if (!rst_n)         pcount <= '0;
    else if (fire)      pcount <= PULSE_TICKS[$bits(pcount)-1:0];
    else if (pcount != 0) pcount <= pcount - 1'b1;
  end

  assign pulse_north = (pcount != 0);
  assign pulse_south = (pcount != 0);
  assign test_mode   = run && !cnt[CNT_BITS-1];

  // ---- delayed crossing: D = B7, clocked by B6 ----
  logic b6_q;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      b6_q         <= 1'b0;
      delayed_xing <= 1'b0;
    end else begin
      b6_q <= cnt[6];
      if (cnt[6] && !b6_q) delayed_xing <= cnt[7];
    end
  end
endmodule
