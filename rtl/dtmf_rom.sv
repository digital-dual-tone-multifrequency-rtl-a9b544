// dtmf_rom: sign-bit ROM and window sequencer.
//
// Holds the hard-limited reference waveforms z = sign(sin(2*pi*f*t + k*pi/3))
// for the eight DTMF frequencies f and the three phases k = 0, 1, 2,
// sampled 100 times at 8 kHz with t = (n - 49.5)/8000, n = 0..99, so that
// the window is centred on t = 0 (2400 bits in all).  sign(0) counts as +1.
//
// A step counter (eight steps per sample, the "down800" sequence of 800
// steps per window) walks through the frequencies from the highest
// (1633 Hz) to the lowest (697 Hz) within each sample, and through the 100
// samples of a window.  At every step the three sign bits of the current
// frequency and sample are output together; first/last mark the first and
// the last sample of the window (the synchronisation used to clear and to
// read out the correlators).
//
// The table is computed at elaboration with exact integer arithmetic:
// with U = 3*f*(2n-99) + 8000*k, sin(...) >= 0 exactly when
// (U mod 48000) < 24000.  None of the DTMF frequencies gives a zero.
//
// Timing: outputs are decoded from registers and change one cycle after
// step_en; they are valid for the whole step.  Synchronous active-low reset.
module dtmf_rom
  import dtmf_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step_en,
  output logic [NPHASE-1:0]   z,        // sign bits, 1 = positive, bit k = phase k*pi/3
  output fidx_t               fidx,     // frequency index of this step (7 first, 0 last)
  output logic [6:0]          sidx,     // sample index in the window, 0..99
  output logic                first,    // first sample of the window
  output logic                last      // last sample of the window
);

  localparam int unsigned TBITS = NPHASE * NFREQ * WIN_LEN;

  function automatic logic [TBITS-1:0] gen_table();
    logic [TBITS-1:0] t;
    int u, m;
    t = '0;
    for (int k = 0; k < NPHASE; k++)
      for (int f = 0; f < NFREQ; f++)
        for (int n = 0; n < WIN_LEN; n++) begin
          u = 3 * int'(FREQ_HZ[f]) * (2 * n - (WIN_LEN - 1)) + 8000 * k;
          m = u % 48000;
          if (m < 0) m += 48000;
          t[(k * NFREQ + f) * WIN_LEN + n] = (m < 24000);
        end
    return t;
  endfunction

  localparam logic [TBITS-1:0] TABLE = gen_table();

  logic [2:0] step;   // step within the sample, 0..7

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step <= '0;
      sidx <= '0;
    end else if (step_en) begin
      step <= step + 3'd1;
      if (step == 3'd7)
        sidx <= (sidx == 7'(WIN_LEN - 1)) ? '0 : sidx + 7'd1;
    end
  end

  assign fidx  = fidx_t'(3'd7 - step);
  assign first = (sidx == '0);
  assign last  = (sidx == 7'(WIN_LEN - 1));

  always_comb begin
    for (int k = 0; k < NPHASE; k++)
      z[k] = TABLE[(k * NFREQ + int'(fidx)) * WIN_LEN + int'(sidx)];
  end

  a_sidx_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 sidx < 7'(WIN_LEN));

endmodule
