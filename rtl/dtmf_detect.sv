// dtmf_detect: detection part of the DTMF receiver.
//
// Latches the 13-bit input at 8 kHz and, within each sample period, lets
// the ROM step through the eight frequencies (highest first).  Three
// time-shared correlators, one per reference phase (0, pi/3, 2*pi/3),
// add or subtract the sample to the running sum of the current frequency;
// the level detector accumulates the sample's magnitude.  Every 100
// samples (12.5 ms) the correlators deliver their finished sums one
// frequency per step; the maximum absolute value over the three phases is
// compared with the power data (a selectable fraction of the magnitude
// sum) and the frequency selector produces the window's result: level,
// valid (one frequency per group) and the 4-bit number.
//
// The block structure follows the design description.  Divided clocks are
// replaced by enables from dtmf_timing on the single master clock.
//
// Interface: res_en_o pulses once per window with res_o and maxes_o (the
// eight per-frequency maxima) valid from then until the next pulse; the remaining outputs are internal nodes brought
// out for the test multiplexer.  Synchronous active-low reset.
module dtmf_detect
  import dtmf_pkg::*;
#(
  parameter int unsigned MIN_LEVEL = 2000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sample_t     din,
  input  logic        s0,
  input  logic        s1,
  output win_result_t res_o,
  output logic        res_en_o,
  // test nodes
  output logic        step_en_o,
  output logic        sample_en_o,
  output logic        rom_clk_o,
  output logic        smp_clk_o,
  output logic [NPHASE-1:0] z_o,
  output logic        first_o,
  output logic [NPHASE-1:0] corr_sign_o,
  output logic        done_o,
  output logic        level_o,
  output logic        cmp_o,
  output logic        pow_ser_o,
  output logic        pow_frame_o,
  output logic [NFREQ-1:0] flags_o,
  output mag_t        maxes_o [NFREQ]
);

  logic    step_en, sample_en;
  sample_t x;                     // input register
  logic [NPHASE-1:0] z;
  fidx_t   fidx;
  logic [6:0] sidx;
  logic    first, last;
  acc_t    sum [NPHASE];
  logic [NPHASE-1:0] done;
  mag_t    lsum, power, maxv;
  logic    level;

  dtmf_timing u_timing (
    .clk       (clk),
    .rst_n     (rst_n),
    .step_en   (step_en),
    .sample_en (sample_en),
    .rom_clk   (rom_clk_o),
    .smp_clk   (smp_clk_o)
  );

  // input register ("inreg"), loaded at 8 kHz
  always_ff @(posedge clk) begin
    if (!rst_n)         x <= '0;
    else if (sample_en) x <= din;
  end

  dtmf_rom u_rom (
    .clk     (clk),
    .rst_n   (rst_n),
    .step_en (step_en),
    .z       (z),
    .fidx    (fidx),
    .sidx    (sidx),
    .first   (first),
    .last    (last)
  );

  for (genvar k = 0; k < NPHASE; k++) begin : g_corr
    dtmf_corr u_corr (
      .clk     (clk),
      .rst_n   (rst_n),
      .step_en (step_en),
      .x       (x),
      .z       (z[k]),
      .first   (first),
      .last    (last),
      .sum_o   (sum[k]),
      .done_o  (done[k])
    );
    assign corr_sign_o[k] = sum[k][ACC_W-1];
  end

  dtmf_level #(.MIN_LEVEL(MIN_LEVEL)) u_level (
    .clk     (clk),
    .rst_n   (rst_n),
    .step_en (step_en),
    .fidx    (fidx),
    .x       (x),
    .first   (first),
    .last    (last),
    .s0      (s0),
    .s1      (s1),
    .lsum_o  (lsum),
    .level_o (level),
    .power_o (power)
  );

  dtmf_comp3 u_comp3 (
    .a0    (sum[0]),
    .a1    (sum[1]),
    .a2    (sum[2]),
    .max_o (maxv)
  );

  dtmf_freqsel u_freqsel (
    .clk      (clk),
    .rst_n    (rst_n),
    .step_en  (step_en),
    .done     (done[0]),
    .fidx     (fidx),
    .max_i    (maxv),
    .power    (power),
    .level    (level),
    .res_o    (res_o),
    .res_en_o (res_en_o),
    .flags_o  (flags_o),
    .maxes_o  (maxes_o),
    .cmp_o    (cmp_o)
  );

  dtmf_testpow u_testpow (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (res_en_o),
    .shift_en (step_en),
    .lsum     (lsum),
    .ser_o    (pow_ser_o),
    .frame_o  (pow_frame_o)
  );

  assign step_en_o   = step_en;
  assign sample_en_o = sample_en;
  assign z_o         = z;
  assign first_o     = first;
  assign done_o      = done[0];
  assign level_o     = level;

endmodule
