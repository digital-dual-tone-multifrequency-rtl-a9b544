// dtmf_freqsel: frequency selection for one correlation window.
//
// During the last sample of a window the correlators deliver one finished
// frequency per step (1633 Hz first, 697 Hz last).  The maximum over the
// three phases of each frequency is registered and, one step later,
// compared with the power data P (a cascaded magnitude comparator, the
// "cmpwithlev" comparison); the outcome sets that frequency's flag.  When
// the last frequency has been compared, the window result is formed:
//   valid  exactly one flag is set among the low group (697..941 Hz) and
//          exactly one among the high group (1209..1633 Hz);
//   num    {index within low group, index within high group}, 2 bits each;
//   level  the level signal of the same window.
// The eight maxima themselves are also kept (maxes_o) for the decision
// part's amplitude-drop check.
// If no flag or several flags are set in a group, valid is low.  That rule
// follows the design description; the one-step pipeline and the parallel
// (not bit-serial) comparison are this implementation's choices.
//
// Timing: res_en_o is a one-cycle pulse, one cycle after the step on which
// the 697 Hz comparison is made (the first step of the next window's first
// sample); res_o and flags_o hold until the next window's result.
module dtmf_freqsel
  import dtmf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step_en,
  input  logic        done,      // max_i is a finished window value
  input  fidx_t       fidx,      // its frequency
  input  mag_t        max_i,     // maximum over the three phases
  input  mag_t        power,     // power data P
  input  logic        level,     // level signal
  output win_result_t res_o,
  output logic        res_en_o,
  output logic [NFREQ-1:0] flags_o,
  output mag_t        maxes_o [NFREQ], // per-frequency maxima of the window
  output logic        cmp_o      // comparison result of the step (test)
);

  logic       pend;
  fidx_t      pidx;
  mag_t       pmax;
  logic       gt, lt;
  logic [NFREQ-1:0] nflags;
  logic [1:0] lo_idx, hi_idx;
  logic [2:0] lo_cnt, hi_cnt;

  dtmf_magcmp #(.W(ACC_W)) u_cmp (
    .a      (pmax),
    .b      (power),
    .a_gt_o (gt),
    .b_gt_o (lt)
  );
  assign cmp_o = gt;

  always_comb begin
    nflags = flags_o;
    nflags[pidx] = gt;
    lo_cnt = '0;
    hi_cnt = '0;
    lo_idx = '0;
    hi_idx = '0;
    for (int i = 0; i < 4; i++) begin
      if (nflags[i])     begin lo_cnt += 3'd1; lo_idx = 2'(i); end
      if (nflags[i + 4]) begin hi_cnt += 3'd1; hi_idx = 2'(i); end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      pidx     <= '0;
      pmax     <= '0;
      flags_o  <= '0;
      for (int i = 0; i < NFREQ; i++) maxes_o[i] <= '0;
      res_o    <= '0;
      res_en_o <= 1'b0;
    end else begin
      res_en_o <= 1'b0;
      if (step_en) begin
        pend <= done;
        pidx <= fidx;
        pmax <= max_i;
        if (pend) begin
          flags_o <= nflags;
          maxes_o[pidx] <= pmax;
          if (pidx == '0) begin
            res_o.level <= level;
            res_o.valid <= (lo_cnt == 3'd1) && (hi_cnt == 3'd1);
            res_o.num   <= {lo_idx, hi_idx};
            res_en_o    <= 1'b1;
          end
        end
      end
    end
  end

  // the window result strobe is a single-cycle pulse
  a_res_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                res_en_o |=> !res_en_o);

endmodule
