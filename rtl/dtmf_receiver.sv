// dtmf_receiver: digital DTMF (touch-tone) receiver core.
//
// Takes 13-bit linear samples, latched internally at 8 kHz from a
// 1024 kHz clock, and reports the key pressed.  The detection part
// correlates 100-sample windows with hard-limited sinusoids (three phases
// per DTMF frequency) and compares the best correlation of each frequency
// with a fraction of the input's magnitude sum; the decision part requires
// three equal valid windows followed by three windows of pause before it
// presents the key code on button and raises digitav.  Three test selects
// route groups of internal nodes to four test pins; the two divided clocks
// are brought out as well.
//
// Test groups (s2tst,s1tst,s0tst -> tstout[3:0]):
//   0: {power serial bit, level, window valid, last comparison}
//   1: {correlator sign bits phase 2..0, window-final step}
//   2: {ROM sign bits phase 2..0, window sync}
//   3: {interval counter[2:0], numbers equal}
//   4: {duration counter[1:0], digit accepted, amplitude drop}
//   5: {ROM clock, sample clock, step enable, sample enable}
//   6, 7: zero.
// The partitioning into detection, decision and test multiplexers and the
// pin set follow the design description; the assignment of nodes to test
// groups is this implementation's own.  Pads are not part of this core.
//
// Reset: rst_n is synchronous and active low.  resdigav_n low clears
// digitav.  s0/s1 select the power fraction (3/8, 1/2, 5/8, 3/4).
module dtmf_receiver
  import dtmf_pkg::*;
#(
  parameter int unsigned MIN_LEVEL = 2000
) (
  input  logic              clk,          // 1024 kHz
  input  logic              rst_n,
  input  logic [DIN_W-1:0]  datin,        // two's-complement sample
  input  logic              resdigav_n,
  input  logic              s0,
  input  logic              s1,
  input  logic              s0tst,
  input  logic              s1tst,
  input  logic              s2tst,
  output logic [3:0]        button,
  output logic              digitav,
  output logic              inplatclktest, // 8 kHz input latch clock
  output logic              romcktest,     // 64 kHz ROM clock
  output logic [3:0]        tstout
);

  win_result_t res;
  logic        res_en;
  logic        step_en, sample_en, rom_clk, smp_clk;
  logic [NPHASE-1:0] z, corr_sign;
  logic        first, done, level, cmp, pow_ser, pow_frame;
  logic [NFREQ-1:0] flags;
  mag_t        maxes [NFREQ];
  logic        drop;
  logic        accept, eq;
  logic [1:0]  durcount;
  logic [2:0]  intcount;

  dtmf_detect #(.MIN_LEVEL(MIN_LEVEL)) u_detect (
    .clk         (clk),
    .rst_n       (rst_n),
    .din         (sample_t'(datin)),
    .s0          (s0),
    .s1          (s1),
    .res_o       (res),
    .res_en_o    (res_en),
    .step_en_o   (step_en),
    .sample_en_o (sample_en),
    .rom_clk_o   (rom_clk),
    .smp_clk_o   (smp_clk),
    .z_o         (z),
    .first_o     (first),
    .corr_sign_o (corr_sign),
    .done_o      (done),
    .level_o     (level),
    .cmp_o       (cmp),
    .pow_ser_o   (pow_ser),
    .pow_frame_o (pow_frame),
    .flags_o     (flags),
    .maxes_o     (maxes)
  );

  dtmf_decision u_decision (
    .clk        (clk),
    .rst_n      (rst_n),
    .res_en     (res_en),
    .res        (res),
    .maxes      (maxes),
    .resdigav_n (resdigav_n),
    .button_o   (button),
    .digitav_o  (digitav),
    .accept_o   (accept),
    .durcount_o (durcount),
    .intcount_o (intcount),
    .eq_o       (eq),
    .drop_o     (drop)
  );

  logic [23:0] nodes;
  assign nodes = {
    rom_clk, smp_clk, step_en, sample_en,         // group 5
    durcount, accept, drop,                       // group 4
    intcount, eq,                                 // group 3
    z, first,                                     // group 2
    corr_sign, done,                              // group 1
    pow_ser, level, res.valid, cmp                // group 0
  };

  dtmf_testmux #(.NGRP(6)) u_testmux (
    .nodes (nodes),
    .sel   ({s2tst, s1tst, s0tst}),
    .tst_o (tstout)
  );

  assign inplatclktest = smp_clk;
  assign romcktest     = rom_clk;

endmodule
