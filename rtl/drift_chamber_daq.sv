// drift_chamber_daq: drift-time readout system for the drift chambers.
//
// One drift-time code generator starts a 4 ns Gray code at each beam crossing
// and fans it out, with the end-of-drift signal, to NUM_DTD eight-channel
// digitizer modules; each stores the time of every hit on its wires and is
// read out over CAMAC. A phase detector gives the offset between the beam
// crossing and the code's start, for a per-event correction. A test generator
// produces a programmable pulse train; outside this logic it is fanned out to
// the far end of the sense wires, so its pulses come back as hits.
//
// The default NUM_DTD = 265 modules cover the three chambers of the system:
// 384 + 830 + 900 wires, each chamber rounded up to whole 8-wire modules
// (48 + 104 + 113). The analog parts (amplifier-discriminators, fanouts,
// sense wires) and the CAMAC branch and crate controllers are outside: each
// module gets its own station line n[i], and the read lines R, X and Q of
// all modules are ORed, as on a dataway. The station numbering, the ORing
// and the module count per chamber are this design's choices.
//
// Interface: clk is the 4 ns tick (250 MHz); rst_n a synchronous power-on
// reset; everything else is synchronous to clk except t_start, which goes
// straight to the phase detector.
module drift_chamber_daq
  import dtd_pkg::*;
#(
  parameter int unsigned NUM_DTD     = 265,
  parameter int unsigned PULSE_TICKS = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // beam crossing and code
  input  logic                         t_start,
  output logic [TIME_BITS-1:0]         gray,
  output logic                         eod,
  output logic                         pd_out,       // offset pulse, to the ADC
  // discriminated wire signals, 8 per module
  input  logic [NUM_DTD-1:0][7:0]      hit,
  // CAMAC dataway
  input  logic [NUM_DTD-1:0]           n_dtd,        // station lines of the DTDs
  input  logic                         n_tg,         // station line of the test generator
  input  logic [3:0]                   a,
  input  logic [4:0]                   f,
  input  logic                         s1,
  input  logic                         s2,
  input  logic                         z,
  input  logic [7:0]                   w,
  output logic [15:0]                  r,
  output logic                         x,
  output logic                         q,
  // trigger shift registers, one per module
  input  logic                         shift,
  input  logic [NUM_DTD-1:0]           ser_in,
  output logic [NUM_DTD-1:0]           ser_out,
  // test generator outputs
  output logic                         test_pulse_north,
  output logic                         test_pulse_south,
  output logic                         test_mode,
  output logic                         delayed_xing,
  // status per module
  output logic [NUM_DTD-1:0]           dtd_busy,
  output logic [NUM_DTD-1:0]           dtd_lost,
  output logic [NUM_DTD-1:0]           dtd_flag_write
);
  logic                      lsb, s2_q, camac_clr;
  logic [NUM_DTD-1:0][15:0]  r_dtd;
  logic [NUM_DTD-1:0]        x_dtd, q_dtd;
  logic                      x_tg, q_tg;

  // Z.S2 clears the code generator as it clears the modules
  always_ff @(posedge clk) begin
    if (!rst_n) s2_q <= 1'b0;
    else        s2_q <= s2;
  end
  assign camac_clr = z && s2 && !s2_q;

  gray_code_gen u_code (
    .clk       (clk),
    .rst_n     (rst_n),
    .t_start   (t_start),
    .camac_clr (camac_clr),
    .gray      (gray),
    .eod       (eod),
    .lsb       (lsb)
  );

  phase_detector u_phase (
    .t_start (t_start),
    .lsb     (lsb),
    .pd_out  (pd_out)
  );

  for (genvar i = 0; i < NUM_DTD; i++) begin : g_dtd
    dtd u_dtd (
      .clk        (clk),
      .rst_n      (rst_n),
      .hit        (hit[i]),
      .gray_in    (gray),
      .eod        (eod),
      .n          (n_dtd[i]),
      .a          (a),
      .f          (f),
      .s1         (s1),
      .s2         (s2),
      .z          (z),
      .w          (w),
      .r          (r_dtd[i]),
      .x          (x_dtd[i]),
      .q          (q_dtd[i]),
      .shift      (shift),
      .ser_in     (ser_in[i]),
      .ser_out    (ser_out[i]),
      .busy       (dtd_busy[i]),
      .lost       (dtd_lost[i]),
      .flag_write (dtd_flag_write[i])
    );
  end

  test_generator #(.PULSE_TICKS(PULSE_TICKS)) u_test (
    .clk          (clk),
    .rst_n        (rst_n),
    .n            (n_tg),
    .a            (a),
    .f            (f),
    .s1           (s1),
    .s2           (s2),
    .z            (z),
    .w            (w),
    .x            (x_tg),
    .q            (q_tg),
    .pulse_north  (test_pulse_north),
    .pulse_south  (test_pulse_south),
    .test_mode    (test_mode),
    .delayed_xing (delayed_xing)
  );

  // dataway: R, X and Q of all modules ORed
  always_comb begin
    r = 16'h0000;
    x = x_tg;
    q = q_tg;
    for (int i = 0; i < NUM_DTD; i++) begin
      r |= r_dtd[i];
      x |= x_dtd[i];
      q |= q_dtd[i];
    end
  end
endmodule
