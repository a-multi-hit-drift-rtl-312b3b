// dtd: eight-channel multi-hit drift-time digitizer module.
//
// Eight discriminated wire signals pass the TEST AND gates (a wire whose TEST
// LATCH bit is 1 is ignored) into dtd_ctrl, which stamps every hit with the
// Gray-coded drift time G0..G7 and writes words {wire pattern, time} into a
// 16 x 16 memory, one word per memory cycle of about 32 ns. Hits on different
// wires within 8 ns share a word; later ones get their own word. At the end
// of the drift interval a flag word (wire pattern zero) is written after the
// data, at most 15 data words are kept, and the MAR is reset so the host reads
// the words in order over CAMAC with F(0) until Q = 0. The wire pattern of the
// whole interval is also collected and shifted out serially for the trigger.
//
// Interface: hit[7:0] are the eight wires (synchronous to clk, active high);
// gray_in and eod come from the code generator through the crate fanout; the
// CAMAC lines are described in dtd_camac; shift/ser_in/ser_out is the trigger
// shift register. Timing: one clock tick is 4 ns (see dtd_pkg). Structure
// and behaviour follow the original module design; the choices are listed
// in the submodules.
module dtd
  import dtd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           hit,
  input  logic [TIME_BITS-1:0] gray_in,
  input  logic                 eod,
  // CAMAC
  input  logic                 n,
  input  logic [3:0]           a,
  input  logic [4:0]           f,
  input  logic                 s1,
  input  logic                 s2,
  input  logic                 z,
  input  logic [7:0]           w,
  output logic [15:0]          r,
  output logic                 x,
  output logic                 q,
  // trigger shift register
  input  logic                 shift,
  input  logic                 ser_in,
  output logic                 ser_out,
  // status, for observation
  output logic                 busy,
  output logic                 lost,
  output logic                 flag_write
);
  logic [7:0] test_latch, hit_gated, cap_wires;
  logic       mem_we, capture, rd_inc, camac_clr, sod;
  logic [3:0] mar;
  dtd_word_t  mem_wdata, mem_rdata;

  // TEST AND gates
  assign hit_gated = hit & ~test_latch;

  dtd_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .hit        (hit_gated),
    .gray_in    (gray_in),
    .eod        (eod),
    .camac_clr  (camac_clr),
    .rd_inc     (rd_inc),
    .mem_we     (mem_we),
    .mem_wdata  (mem_wdata),
    .mar        (mar),
    .capture    (capture),
    .cap_wires  (cap_wires),
    .busy       (busy),
    .lost       (lost),
    .flag_write (flag_write),
    .sod        (sod)
  );

  ram16 #(.WIDTH(16), .DEPTH(16)) u_mem (
    .clk   (clk),
    .we    (mem_we),
    .waddr (mar),
    .wdata (mem_wdata),
    .raddr (mar),
    .rdata (mem_rdata)
  );

  dtd_camac u_camac (
    .clk        (clk),
    .rst_n      (rst_n),
    .n          (n),
    .a          (a),
    .f          (f),
    .s1         (s1),
    .s2         (s2),
    .z          (z),
    .w          (w),
    .rdata      (mem_rdata),
    .r          (r),
    .x          (x),
    .q          (q),
    .rd_inc     (rd_inc),
    .camac_clr  (camac_clr),
    .test_latch (test_latch)
  );

  wire_shift_reg u_sreg (
    .clk     (clk),
    .rst_n   (rst_n),
    .capture (capture),
    .pattern (cap_wires),
    .load    (flag_write),
    .sod     (sod),
    .clr     (camac_clr),
    .shift   (shift),
    .ser_in  (ser_in),
    .ser_out (ser_out)
  );
endmodule
