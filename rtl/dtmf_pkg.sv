// dtmf_pkg: constants and types shared by the DTMF receiver.
//
// The receiver samples a 13-bit two's-complement input at 8 kHz (the
// 1024 kHz master clock divided by 128) and correlates 100-sample windows
// with hard-limited sinusoids at the eight DTMF frequencies, three phases
// each (0, pi/3, 2*pi/3).  Frequency index 0..3 is the low group
// (697, 770, 852, 941 Hz) and 4..7 the high group (1209, 1336, 1477,
// 1633 Hz).  Sums are 20 bits wide, enough for 100 full-scale samples.
// The widths, window length and frequencies follow the design description;
// the struct grouping below is this implementation's own.
package dtmf_pkg;

  localparam int unsigned DIN_W   = 13;   // input sample width
  localparam int unsigned ACC_W   = 20;   // correlator / level sum width
  localparam int unsigned NFREQ   = 8;    // DTMF frequencies
  localparam int unsigned NPHASE  = 3;    // reference phases per frequency
  localparam int unsigned WIN_LEN = 100;  // samples per correlation window

  // DTMF frequencies in Hz, index 0 = 697 Hz ... 7 = 1633 Hz.
  localparam int unsigned FREQ_HZ [NFREQ] = '{697, 770, 852, 941, 1209, 1336, 1477, 1633};

  typedef logic signed [DIN_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic        [ACC_W-1:0] mag_t;
  typedef logic        [2:0]       fidx_t;

  // Result of one correlation window, as produced by the detection part.
  typedef struct packed {
    logic       level;  // signal power above the minimum level
    logic       valid;  // exactly one frequency in each group exceeded the power data
    logic [3:0] num;    // {low-group index, high-group index}
  } win_result_t;

endpackage
