// dtd_ctrl: hit capture and memory write control of one drift-time digitizer.
//
// Eight wires share one memory. A rising edge on a wire sets that wire's TIME
// flip-flop. While no memory cycle runs, any set TIME flip-flop starts one: the
// Gray-coded drift time of that tick goes into the TIME LATCH and the INHIBIT
// flip-flop blocks further starts. CAPTURE_AT+1 ticks later (8 ns) the TIME
// flip-flops that are set by then are copied into the MEMORY HOLD register and
// cleared one by one, so wires hit up to 8 ns after the first share its word
// and its time. The word {wire pattern, time} is written at WRITE_AT, and at
// the end of the memory cycle (EMC, CYCLE_TICKS ticks, about 32 ns) the memory
// address register (MAR) advances. A wire hit later in the cycle stays in its
// TIME flip-flop and starts the next cycle right after EMC; its word carries
// the time of that later start.
//
// Only 15 words hold data: when the MAR has reached the last location, data
// words are dropped (`lost` pulses) and the MAR stops. When eod rises (end of
// drift) no new cycle starts, the cycle in progress completes, the TIME
// flip-flops are then held clear,
// a flag word (wire pattern zero, time = current code) is written at the MAR,
// and the MAR returns to 0 for readout (the END pulse). During readout
// rd_inc advances the MAR. At the start of the next drift interval (eod falls)
// the MAR is cleared again. camac_clr clears everything.
//
// From the original design: TIME flip-flops, OR, INHIBIT, TIME LATCH, MEMORY HOLD,
// 8 ns delay and 8 ns WRITE, EMC, MAR incremented at EMC and by readout, reset
// by END, the 0-10 ns / 10-32 ns split, 15 data words plus flag word, EOD
// inhibit. This design's choices: hits are taken as synchronous to clk and
// sampled once per 4 ns tick; the tick counts CAPTURE_AT, WRITE_AT and
// CYCLE_TICKS; stopping the MAR at location 15 to drop excess words; the
// flag's time bits; clearing the MAR also when a drift interval starts.
module dtd_ctrl
  import dtd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           hit,        // wire signals after the test gates
  input  logic [TIME_BITS-1:0] gray_in,    // G0..G7
  input  logic                 eod,        // high outside the drift interval
  input  logic                 camac_clr,  // clear, one tick
  input  logic                 rd_inc,     // readout: MAR + 1, one tick
  // memory write port and address
  output logic                 mem_we,
  output dtd_word_t            mem_wdata,
  output logic [3:0]           mar,
  // wire pattern of each memory cycle, for the buffer flip-flops
  output logic                 capture,
  output logic [7:0]           cap_wires,  // pattern latched at this capture
  // status
  output logic                 busy,       // memory cycle in progress (INHIBIT)
  output logic                 lost,       // a data word was dropped: memory full
  output logic                 flag_write, // flag word written (END)
  output logic                 sod         // start of drift interval
);
  localparam int unsigned CW = $clog2(CYCLE_TICKS);

  logic [7:0]           hit_q, rise, time_ff, pending;
  logic [CW-1:0]        cyc;
  logic [TIME_BITS-1:0] time_latch;
  logic                 eod_q, eod_rise, flag_pend;
  logic                 emc, start, full, do_flag;
  logic [7:0]           hold;   // MEMORY HOLD register

  assign rise     = hit & ~hit_q & {8{~eod}};
  assign pending  = time_ff | rise;
  assign emc      = busy && (cyc == CW'(CYCLE_TICKS - 1));
  assign start    = (!busy || emc) && !eod && (pending != 8'h00);
  assign capture  = busy && (cyc == CW'(CAPTURE_AT));
  assign cap_wires = pending;
  assign full     = (mar == 4'hF);
  assign eod_rise = eod && !eod_q;
  assign sod      = !eod && eod_q;
  assign do_flag  = (flag_pend || eod_rise) && !busy;

  // write port: data word at WRITE_AT, flag word at END
  always_comb begin
    mem_we    = 1'b0;
    mem_wdata = '{wires: hold, time_g: time_latch};
    if (busy && cyc == CW'(WRITE_AT) && !full) begin
      mem_we = 1'b1;
    end else if (do_flag) begin
      mem_we    = 1'b1;
      mem_wdata = '{wires: 8'h00, time_g: gray_in};
    end
  end

  assign lost       = busy && (cyc == CW'(WRITE_AT)) && full;
  assign flag_write = do_flag;

  always_ff @(posedge clk) begin
    if (!rst_n || camac_clr) begin
      hit_q      <= 8'h00;
      time_ff    <= 8'h00;
      hold       <= 8'h00;
      time_latch <= '0;
      busy       <= 1'b0;
      cyc        <= '0;
      mar        <= 4'h0;
      flag_pend  <= 1'b0;
      eod_q      <= 1'b1;
    end else begin
      hit_q <= hit;
      eod_q <= eod;

      // TIME flip-flops: set by a wire's edge, cleared when captured or by EOD
      if (eod && !busy) time_ff <= 8'h00;   // a cycle in progress keeps its hits
      else if (capture) time_ff <= 8'h00;   // every set flip-flop was captured
      else              time_ff <= pending;

      if (capture) hold <= pending;

      // INHIBIT and the memory-cycle sequence
      if (start) begin
        busy       <= 1'b1;
        cyc        <= '0;
        time_latch <= gray_in;
      end else if (emc) begin
        busy <= 1'b0;
        cyc  <= '0;
      end else if (busy) begin
        cyc <= cyc + 1'b1;
      end

      // end of drift: flag word once the memory is free, then END
      if (do_flag)       flag_pend <= 1'b0;
      else if (eod_rise) flag_pend <= 1'b1;

      // MAR
      if (do_flag || sod)        mar <= 4'h0;
      else if (emc && !full)     mar <= mar + 1'b1;
      else if (rd_inc && !busy)  mar <= mar + 1'b1;
    end
  end
endmodule
