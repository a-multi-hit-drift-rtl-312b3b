// dtd_camac: CAMAC dataway interface of one drift-time digitizer.
//
// Decodes the station line n, subaddress a and function f, and acts on the
// rising edges of the strobes s1 and s2 (the CAMAC lines are taken as
// synchronous to clk):
//   F(0)  read: R1-R16 carry the memory word at the MAR; at S2 the MAR
//         advances. Q is 1 for a data word and 0 for the flag word (upper byte
//         zero), which ends a stop-mode block transfer in this module.
//   F(16) write: at S1 the TEST LATCH takes W1-W8. A latch bit of 1 disables
//         that wire at the TEST AND gates.
//   Z.S2  initialize: clears the module and the TEST LATCH.
// X is 1 for F(0) and F(16). R is zero unless this module is read, so the R
// lines of many modules can be ORed.
//
// From the original design: the 74154 decoder with F(0) and F(16), the A gate, S1 to
// the TEST LATCH, Z.S2 giving CLR, the flag and stop mode, the 16 read and 8
// write lines. This design's choices: subaddress A = 0 is required, Q is the
// flag test, and the polarity of the TEST LATCH bits.
module dtd_camac
  import dtd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       n,
  input  logic [3:0] a,
  input  logic [4:0] f,
  input  logic       s1,
  input  logic       s2,
  input  logic       z,
  input  logic [7:0] w,
  input  dtd_word_t  rdata,       // memory word at the MAR
  output logic [15:0] r,
  output logic       x,
  output logic       q,
  output logic       rd_inc,      // MAR + 1 after a read, one tick
  output logic       camac_clr,   // clear, one tick
  output logic [7:0] test_latch   // 1 = wire disabled
);
  logic s1_q, s2_q, s1_rise, s2_rise;
  logic sel, f_rd, f_wr;

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

  assign sel  = n && (a == 4'd0);
  assign f_rd = sel && (f == F_READ_MEM);
  assign f_wr = sel && (f == F_WRITE_LATCH);

  assign r         = f_rd ? rdata : 16'h0000;
  assign x         = f_rd || f_wr;
  assign q         = f_wr || (f_rd && (rdata.wires != 8'h00));
  assign rd_inc    = f_rd && s2_rise;
  assign camac_clr = z && s2_rise;

  always_ff @(posedge clk) begin
    if (!rst_n || camac_clr) test_latch <= 8'h00;
    else if (f_wr && s1_rise) test_latch <= w;
  end
endmodule
