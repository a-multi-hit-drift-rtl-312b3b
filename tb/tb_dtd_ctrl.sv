// tb_dtd_ctrl: drives the hit capture and write control of one DTD through
// three drift intervals and checks every memory write against words worked
// out by hand from the timing rules:
//  - a single hit is stored with the code of its own tick;
//  - a second wire 8 ns after the first shares the word and the time;
//  - a second wire 12 ns after the first gets its own word, stamped one
//    memory cycle (8 ticks, 32 ns) after the first;
//  - the flag word follows the data, and the MAR is back at 0 for readout;
//  - readout steps the MAR; at most 15 data words are kept, the 16th location
//    holds the flag; a cycle running at the end of drift completes;
//  - hits outside the drift interval are ignored;
//  - 40 drift intervals of random hits, of varied density, against a
//    tick-by-tick reference of the same rules written in the testbench.
`timescale 1ns/1ps
module tb_dtd_ctrl;
  import dtd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] hit = 0;
  logic [7:0] gray_in = 0;
  logic eod = 1, camac_clr = 0, rd_inc = 0;
  logic mem_we, capture, busy, lost, flag_write, sod;
  dtd_word_t mem_wdata;
  logic [3:0] mar;
  logic [7:0] cap_wires;

  int checks = 0, failures = 0;
  int cnt = 0;                 // code count driven on gray_in
  int timer [8];
  dtd_word_t mem_model [16];
  int n_writes = 0, n_lost = 0, n_flag = 0;

  always #2 clk = ~clk;

  dtd_ctrl dut (.*);

  function automatic logic [7:0] g(input int c);
    logic [7:0] b;
    b = c[7:0];
    return b ^ {1'b0, b[7:1]};
  endfunction

  // record what the DUT writes
  always @(posedge clk) begin
    if (rst_n && mem_we) begin
      mem_model[mar] <= mem_wdata;
      n_writes++;
    end
    if (rst_n && lost) n_lost++;
    if (rst_n && flag_write) n_flag++;
  end

  // stimulus: code advances every tick; wire pulses last 10 ticks (40 ns)
  bit restart = 0;
  bit rand_on = 0;
  int rand_div = 40;
  int edge_tick [$];
  int edge_wire [$];
  always @(negedge clk) begin
    if (restart) begin
      cnt = 0;
      restart = 0;
    end else begin
      cnt++;
    end
    gray_in <= g(cnt);
    for (int i = 0; i < 8; i++) begin
      if (timer[i] > 0) timer[i]--;
      // random mode: a wire that is low may fire; record the tick of its edge
      if (rand_on && timer[i] == 0 && !hit[i] && ($urandom % rand_div) == 0) begin
        timer[i] = 10;
        edge_tick.push_back(cnt);
        edge_wire.push_back(i);
      end
      hit[i] <= (timer[i] > 0);
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // wait until the clock edge after which the code count becomes c:
  // a hit fired there rises together with code c
  task automatic at(input int c);
    @(posedge clk);
    while (cnt != c - 1) @(posedge clk);
  endtask

  task automatic fire(input int w);
    timer[w] = 11;   // hit rises at the next negedge, for 10 ticks
  endtask

  task automatic check_word(input int addr, input logic [7:0] wires, input logic [7:0] t, input string what);
    check(mem_model[addr].wires == wires && mem_model[addr].time_g == t,
          $sformatf("%s: word %0d = %h/%h, expected %h/%h", what, addr,
                    mem_model[addr].wires, mem_model[addr].time_g, wires, t));
  endtask

  task automatic start_drift();
    @(posedge clk);
    restart = 1;
    eod = 0;
  endtask


  // Reference: the words one drift interval must produce, worked out tick by
  // tick from the recorded edges. A word starts in the tick of its first
  // pending edge (or at the previous word's EMC, 8 ticks after its start),
  // takes that tick's code, and collects every wire edge up to 2 ticks later.
  task automatic expected_words(output logic [15:0] words [$]);
    logic [7:0] pend = 0, cur = 0;
    bit bsy = 0;
    int st = 0, last = 0;
    words = {};
    foreach (edge_tick[k]) if (edge_tick[k] > last) last = edge_tick[k];
    for (int t = 0; t <= last + 20; t++) begin
      foreach (edge_tick[k]) if (edge_tick[k] == t) pend[edge_wire[k]] = 1'b1;
      if (bsy && t == st + 2) begin
        words.push_back({pend, g(st)});
        pend = 0;
      end
      if ((!bsy || t == st + 8) && pend != 0) begin
        bsy = 1; st = t;
      end else if (bsy && t == st + 8) begin
        bsy = 0;
      end
    end
  endtask

  task automatic random_event(input int div, input int len);
    logic [15:0] exp_words [$];
    int kept;
    n_writes = 0; n_flag = 0; n_lost = 0;
    edge_tick = {}; edge_wire = {};
    rand_div = div;
    start_drift();
    at(2); rand_on = 1;
    at(len); rand_on = 0;
    at(len + 60); eod = 1;
    repeat (20) @(posedge clk);
    expected_words(exp_words);
    kept = (exp_words.size() > 15) ? 15 : exp_words.size();
    check(n_flag == 1, "random: one flag");
    check(n_lost == exp_words.size() - kept,
          $sformatf("random: %0d lost, expected %0d", n_lost, exp_words.size() - kept));
    check(n_writes == kept + 1, $sformatf("random: %0d writes, expected %0d", n_writes, kept + 1));
    for (int k = 0; k < kept; k++)
      check(mem_model[k] == exp_words[k],
            $sformatf("random: word %0d = %h, expected %h", k, mem_model[k], exp_words[k]));
    check(mem_model[kept].wires == 8'h00, "random: flag after the data");
    n_random_words += exp_words.size();
  endtask

  int n_random_words = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) timer[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---------- event 1 ----------
    start_drift();
    at(5);   fire(2);
    at(30);  fire(5);
    at(32);  fire(1);
    at(60);  fire(3);
    at(63);  fire(6);
    at(100); fire(0); fire(7);
    at(120); fire(4);
    at(140); fire(4);
    at(200); eod = 1;
    repeat (3) @(negedge clk);
    check(n_flag == 1, "one flag write");
    check(mar == 4'd0, "MAR at 0 after END");
    check(n_writes == 8, $sformatf("8 writes, got %0d", n_writes));
    check_word(0, 8'h04, g(5),   "single hit");
    check_word(1, 8'h22, g(30),  "hits 8 ns apart share a word");
    check_word(2, 8'h08, g(60),  "first of hits 12 ns apart");
    check_word(3, 8'h40, g(68),  "second of hits 12 ns apart, next cycle");
    check_word(4, 8'h81, g(100), "simultaneous hits");
    check_word(5, 8'h10, g(120), "first hit on wire 4");
    check_word(6, 8'h10, g(140), "second hit on the same wire");
    check(mem_model[7].wires == 8'h00, "flag word after the data");
    // readout steps the MAR
    for (int k = 0; k < 8; k++) begin
      @(posedge clk) rd_inc = 1;
      @(posedge clk) rd_inc = 0;
    end
    check(mar == 4'd8, $sformatf("MAR after 8 reads = %0d", mar));
    // hits outside the drift interval are ignored
    fire(3);
    repeat (20) @(posedge clk);
    check(n_writes == 8 && !busy, "no write outside drift");

    // ---------- event 2: overflow ----------
    n_writes = 0; n_flag = 0;
    start_drift();
    repeat (2) @(negedge clk);
    check(mar == 4'd0, "MAR cleared at start of drift");
    for (int k = 0; k < 20; k++) begin
      at(10 + 12 * k);
      fire(k % 8);
    end
    at(300); eod = 1;
    repeat (3) @(negedge clk);
    check(n_lost == 5, $sformatf("5 words lost, got %0d", n_lost));
    check(n_writes == 16, $sformatf("15 data + flag writes, got %0d", n_writes));
    for (int k = 0; k < 15; k++)
      check_word(k, 8'h01 << (k % 8), g(10 + 12 * k), "overflow event data");
    check(mem_model[15].wires == 8'h00, "flag in the 16th location");

    // ---------- event 3: end of drift during a memory cycle ----------
    n_writes = 0; n_flag = 0;
    start_drift();
    at(10); fire(6);
    at(12); eod = 1;
    check(busy, "cycle running at end of drift");
    repeat (12) @(negedge clk);
    check(n_writes == 2 && n_flag == 1, "data word then flag");
    check_word(0, 8'h40, g(10), "word of the cycle running at EOD");
    check(mem_model[1].wires == 8'h00, "flag after it");

    // CAMAC clear
    start_drift();
    at(5); fire(1);
    at(20);
    camac_clr = 1; @(posedge clk) camac_clr = 0; #1;
    check(mar == 4'd0 && !busy, "clear resets MAR and INHIBIT");

    // ---------- random events against the reference ----------
    for (int e = 0; e < 40; e++) random_event(3 + 12 * (e % 8), 60 + 12 * (e % 10));
    check(n_random_words > 200, $sformatf("random events produced %0d words", n_random_words));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
