// dtmf_decision: tone duration and pause checking.
//
// Runs once per correlation window (12.5 ms) on the detection result.
//   drop       amplitude-drop check: when the previous number was valid and
//              the current window's maximum at either of that number's two
//              frequencies has fallen below 3/4 of the previous window's
//              maximum there, the window is treated as a pause even if its
//              level is high.  This catches the window in which a tone
//              ends part-way, whose spectrum is smeared.
//   cmp        the window's number is compared with the previous one by
//              subtraction; equal when all difference bits are zero.
//   durcount   in a window with (effective) high level: counts windows in
//              which a valid number equals the previous valid number,
//              stopping at 2 (three equal windows); any other window with
//              high level clears it.  In a pause window it holds.
//   intcount   returns to 1 in every window with high level; in a pause
//              window, once durcount is 2, it counts up to 4 and stops.
// The step of intcount from 3 to 4, the third pause window after an
// accepted tone, accepts the digit: the number, converted by dtmf_sysdata,
// is latched on button_o and digitav_o goes high.  digitav_o is cleared by
// resdigav_n low (a new acceptance in the same cycle wins).  The previous
// number is only replaced in windows with high level, so it survives the
// pause.
// The counters, their limits and the comparison follow the design
// description, the amplitude-drop check follows the design's algorithm
// model; the active-low digit-available reset and its priority are this
// implementation's choices.
//
// Timing: all registers change on the cycle after res_en; accept_o pulses
// on that cycle, together with the update of button_o and digitav_o.
module dtmf_decision
  import dtmf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        res_en,
  input  win_result_t res,
  input  mag_t        maxes [NFREQ],  // per-frequency maxima of this window
  input  logic        resdigav_n,
  output logic [3:0]  button_o,
  output logic        digitav_o,
  output logic        accept_o,     // one-cycle pulse when a digit is accepted
  output logic [1:0]  durcount_o,
  output logic [2:0]  intcount_o,
  output logic        eq_o,         // current number equals previous
  output logic        drop_o        // amplitude-drop check fired
);

  logic [3:0] prev_num;
  logic       prev_valid;
  mag_t       prev_max [NFREQ];     // maxima of the previous window
  logic [3:0] diff;
  logic [3:0] code;
  logic       accept, lvl;
  mag_t       cur_lo, cur_hi, old_lo, old_hi;

  assign diff = res.num - prev_num;
  assign eq_o = (diff == 4'd0);

  // amplitude-drop check at the previous number's two frequencies
  assign cur_lo = maxes[{1'b0, prev_num[3:2]}];
  assign cur_hi = maxes[{1'b1, prev_num[1:0]}];
  assign old_lo = prev_max[{1'b0, prev_num[3:2]}];
  assign old_hi = prev_max[{1'b1, prev_num[1:0]}];
  assign drop_o = res.level && prev_valid &&
                  ((cur_lo < (old_lo >> 1) + (old_lo >> 2)) ||
                   (cur_hi < (old_hi >> 1) + (old_hi >> 2)));
  assign lvl    = res.level && !drop_o;

  dtmf_sysdata u_sys (.num(prev_num), .code(code));

  assign accept = res_en && !lvl && (durcount_o == 2'd2) && (intcount_o == 3'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_num   <= '0;
      prev_valid <= 1'b0;
      for (int i = 0; i < NFREQ; i++) prev_max[i] <= '0;
      durcount_o <= '0;
      intcount_o <= 3'd1;
      button_o   <= '0;
      digitav_o  <= 1'b0;
      accept_o   <= 1'b0;
    end else begin
      accept_o <= accept;
      if (res_en) begin
        for (int i = 0; i < NFREQ; i++) prev_max[i] <= maxes[i];
        if (lvl) begin
          intcount_o <= 3'd1;
          prev_num   <= res.num;
          prev_valid <= res.valid;
          if (res.valid && prev_valid && eq_o)
            durcount_o <= (durcount_o == 2'd2) ? 2'd2 : durcount_o + 2'd1;
          else
            durcount_o <= '0;
        end else if (durcount_o == 2'd2 && intcount_o != 3'd4) begin
          intcount_o <= intcount_o + 3'd1;
        end
      end
      if (accept) begin
        button_o  <= code;
        digitav_o <= 1'b1;
      end else if (!resdigav_n) begin
        digitav_o <= 1'b0;
      end
    end
  end

  a_dur_range: assert property (@(posedge clk) disable iff (!rst_n)
                                durcount_o <= 2'd2);
  a_int_range: assert property (@(posedge clk) disable iff (!rst_n)
                                intcount_o >= 3'd1 && intcount_o <= 3'd4);
  a_acc_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                accept_o |-> digitav_o);

endmodule
