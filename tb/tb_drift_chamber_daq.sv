// tb_drift_chamber_daq: the whole readout system at its default size (265
// digitizer modules), through two beam crossings.
//
// Event 1: the test generator is loaded with 16 pulse times 10 counts apart
// and started together with the beam crossing; its pulse train is wired to
// all eight wires of modules 1 and 2 (as the test fanout does through the
// sense wires), and module 2 has wires 0-3 disabled in its TEST LATCH.
// Module 0 gets hand-placed hits: a lone hit, two wires 8 ns apart (one
// shared word) and two wires 12 ns apart (two words). After the end of drift
// every module is read in stop mode (F(0) until Q = 0) and its trigger shift
// register is shifted out. Checked against values worked out here: module 0's
// words and times; modules 1 and 2 keep 15 words, lose the 16th, carry
// Gray times whose binary values step by 10; module 2's words hold only wires
// 4-7; every other module holds only its flag; the phase detector pulse runs
// from t_start to the code's first LSB edge; the delayed crossing appears.
// Event 2: a later crossing at another clock phase, cut short by Z.S2.
// Each mechanism is counted and a mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_drift_chamber_daq;
  import dtd_pkg::*;

  localparam int ND = 265;
  logic clk = 0, rst_n = 0, t_start = 0;
  logic [7:0] gray;
  logic eod, pd_out;
  logic [ND-1:0][7:0] hit;
  logic [ND-1:0] n_dtd = '0;
  logic n_tg = 0;
  logic [3:0] a = 0;
  logic [4:0] f = 0;
  logic s1 = 0, s2 = 0, z = 0;
  logic [7:0] w = 0;
  logic [15:0] r;
  logic x, q;
  logic shift = 0;
  logic [ND-1:0] ser_in = '0, ser_out;
  logic test_pulse_north, test_pulse_south, test_mode, delayed_xing;
  logic [ND-1:0] dtd_busy, dtd_lost, dtd_flag_write;

  int checks = 0, failures = 0;
  int cnt = 0;
  logic [7:0] hand [8];     // module 0 wires, driven by the test
  int timer [8];

  // mechanism counters
  int m_shared = 0, m_split = 0, m_lost = 0, m_flag = 0, m_disabled = 0;
  int m_pulses = 0, m_xing = 0, m_phase = 0, m_shift = 0, m_clear = 0;

  always #2 clk = ~clk;

  drift_chamber_daq dut (.*);

  // wiring of the hits: module 0 from the test, modules 1 and 2 from the
  // test pulse train, the rest idle
  always_comb begin
    hit = '0;
    for (int i = 0; i < 8; i++) hit[0][i] = (timer[i] > 0);
    hit[1] = {8{test_pulse_north}};
    hit[2] = {8{test_pulse_south}};
  end

  always @(negedge clk) begin
    cnt++;
    for (int i = 0; i < 8; i++) if (timer[i] > 0) timer[i]--;
  end

  always @(posedge clk) begin
    if (rst_n) m_lost += $countones(dtd_lost);
  end

  function automatic logic [7:0] g2b(input logic [7:0] gg);
    logic [7:0] b;
    b[7] = gg[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ gg[i];
    return b;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic camac(input int station, input logic tg, input logic [4:0] ff, input logic [7:0] ww,
                       output logic [15:0] rr, output logic qq);
    @(negedge clk);
    n_dtd = '0;
    if (station >= 0) n_dtd[station] = 1'b1;
    n_tg = tg; a = 0; f = ff; w = ww;
    repeat (2) @(negedge clk); s1 = 1;
    #1 rr = r; qq = q;
    check(x == 1, $sformatf("X for station %0d F(%0d)", station, ff));
    repeat (2) @(negedge clk); s1 = 0;
    repeat (2) @(negedge clk); s2 = 1;
    repeat (2) @(negedge clk); s2 = 0;
    @(negedge clk); n_dtd = '0; n_tg = 0;
  endtask

  task automatic z_s2();
    @(negedge clk); z = 1;
    repeat (2) @(negedge clk); s2 = 1;
    repeat (2) @(negedge clk); s2 = 0; z = 0;
  endtask

  // count of the drift code when module 0's hit should be stamped
  int code_at_start;
  task automatic hand_hit(input int wire_no, input int c);
    while (g2b(gray) != c[7:0] - 1 || eod) @(posedge clk);
    #1 timer[wire_no] = 10;
  endtask

  realtime t_ts, t_pd_fall, t_first_edge, width1;
  always @(negedge pd_out) t_pd_fall = $realtime;
  always @(posedge gray[0]) if (t_first_edge == 0) t_first_edge = $realtime;

  logic [15:0] rr;
  logic qq;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the beam crossing arrives at a fraction of a tick
  task automatic crossing(input real phase);
    @(posedge clk);
    #(phase);
    t_first_edge = 0;
    t_start = 1; t_ts = $realtime;
    fork
      #20 t_start = 0;
    join_none
  endtask

  initial begin
    int words [ND];
    logic [15:0] mem0 [16];
    logic [7:0] prev_b;
    logic [7:0] pat;
    int xing_seen;
    for (int i = 0; i < 8; i++) timer[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    z_s2();
    // test generator: 16 pulse times 10 counts apart
    camac(-1, 1, F_TG_CLEAR, 0, rr, qq);
    for (int k = 0; k < 16; k++) camac(-1, 1, F_TG_LOAD, 8'(20 + 10 * k), rr, qq);
    // module 2: wires 0-3 disabled
    camac(2, 0, F_WRITE_LATCH, 8'h0F, rr, qq);

    // ---------------- event 1 ----------------
    crossing(1.3);
    fork
      camac(-1, 1, F_TG_EXECUTE, 0, rr, qq);
    join_none
    wait (!eod);
    hand_hit(0, 10);
    hand_hit(1, 40);
    hand_hit(2, 42);
    hand_hit(5, 80);
    hand_hit(7, 83);
    xing_seen = 0;
    while (!eod) begin
      @(posedge clk);
      if (delayed_xing) xing_seen = 1;
    end
    wait fork;
    if (xing_seen) m_xing++;
    @(posedge clk);
    while (test_mode) begin @(posedge clk); if (delayed_xing) xing_seen = 1; end
    if (xing_seen && m_xing == 0) m_xing++;
    // phase detector: from t_start to the first LSB edge of the code
    check(t_pd_fall > t_ts && t_pd_fall == t_first_edge,
          $sformatf("phase pulse %0f..%0f, first code edge %0f", t_ts, t_pd_fall, t_first_edge));
    if (t_pd_fall > t_ts) m_phase++;
    width1 = t_pd_fall - t_ts;
    repeat (20) @(posedge clk);

    // stop-mode readout of every module
    for (int s = 0; s < ND; s++) begin
      words[s] = 0;
      qq = 1;
      while (qq && words[s] < 20) begin
        camac(s, 0, F_READ_MEM, 0, rr, qq);
        if (qq) begin
          if (words[s] < 16) mem0[words[s]] = rr;
          if (s == 0 && words[s] < 4) begin
            logic [15:0] e;
            case (words[s])
              0: e = {8'h01, 8'd10};
              1: e = {8'h06, 8'd40};
              2: e = {8'h20, 8'd80};
              default: e = {8'h80, 8'd88};
            endcase
            check(rr[15:8] == e[15:8] && g2b(rr[7:0]) == e[7:0],
                  $sformatf("module 0 word %0d = %h/%0d, expected %h/%0d", words[s], rr[15:8], g2b(rr[7:0]), e[15:8], e[7:0]));
          end
          if ($countones(rr[15:8]) > 1 && s == 0) m_shared++;
          if (s == 0 && words[s] == 3 && g2b(rr[7:0]) == 8'd88) m_split++;
          if (s == 2) begin
            check(rr[15:8] == 8'hF0, "module 2 words hold only wires 4-7");
            if (rr[15:8] == 8'hF0) m_disabled++;
          end
          if ((s == 1 || s == 2) && words[s] > 0)
            check(g2b(rr[7:0]) - prev_b == 8'd10, $sformatf("module %0d pulse spacing %0d", s, g2b(rr[7:0]) - prev_b));
          prev_b = g2b(rr[7:0]);
          words[s]++;
        end else begin
          check(rr[15:8] == 8'h00, "stop on the flag word");
          m_flag++;
        end
      end
    end
    check(words[0] == 4, $sformatf("module 0: %0d words", words[0]));
    check(words[1] == 15 && words[2] == 15, $sformatf("modules 1, 2: %0d, %0d words (15 kept)", words[1], words[2]));
    if (words[1] == 15) m_pulses += 16;
    for (int s = 3; s < ND; s++)
      check(words[s] == 0, $sformatf("module %0d: %0d words", s, words[s]));
    check(m_lost == 2, $sformatf("one word lost in modules 1 and 2, got %0d", m_lost));

    // trigger shift registers
    for (int i = 7; i >= 0; i--) begin
      pat[i] = ser_out[0];
      check(ser_out[1] == 1'b1 && ser_out[3] == 1'b0 && ser_out[ND-1] == 1'b0, "idle and test module patterns");
      check(ser_out[2] == (i >= 4), "module 2 pattern");
      @(posedge clk); shift = 1;
      @(posedge clk); shift = 0;
      #1;
    end
    check(pat == 8'hA7, $sformatf("module 0 pattern %h, expected a7", pat));
    if (pat == 8'hA7) m_shift++;

    // ---------------- event 2: another phase, then Z.S2 ----------------
    crossing(2.9);
    wait (!eod);
    repeat (3) @(posedge clk);
    check(t_pd_fall > t_ts && t_pd_fall == t_first_edge, "phase pulse, event 2");
    if (t_pd_fall > t_ts) m_phase++;
    check((t_pd_fall - t_ts) != width1, "offset differs with the crossing's phase");
    hand_hit(4, 30);
    repeat (30) @(posedge clk);
    z_s2();
    @(posedge clk); #1;
    check(eod == 1 && gray == 0, "Z.S2 ends the drift interval");
    check(dtd_busy == '0, "no memory cycle after clear");
    // the clear returned the MAR to 0: the first read gives this event's hit
    camac(0, 0, F_READ_MEM, 0, rr, qq);
    check(qq == 1 && rr[15:8] == 8'h10 && g2b(rr[7:0]) == 8'd30,
          $sformatf("read after clear %h/%0d, expected 10/30", rr[15:8], g2b(rr[7:0])));
    if (eod && qq && rr[15:8] == 8'h10) m_clear++;

    // mechanisms
    check(m_shared > 0,   "hits within 8 ns shared a word");
    check(m_split > 0,    "hits 12 ns apart got two words");
    check(m_lost > 0,     "memory overflow");
    check(m_flag == ND,   $sformatf("stop mode ended on the flag in every module (%0d)", m_flag));
    check(m_disabled > 0, "TEST LATCH disabled wires");
    check(m_pulses > 0,   "test pulse train");
    check(m_xing > 0,     "delayed crossing");
    check(m_phase == 2,   "phase detector pulses");
    check(m_shift > 0,    "trigger shift register");
    check(m_clear > 0,    "CAMAC clear");
    $display("mechanisms: shared=%0d split=%0d lost=%0d flag=%0d disabled=%0d pulses=%0d xing=%0d phase=%0d shift=%0d clear=%0d",
             m_shared, m_split, m_lost, m_flag, m_disabled, m_pulses, m_xing, m_phase, m_shift, m_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
