// dtmf_level: signal level detection and power data.
//
// Accumulates the absolute value of the input over each 100-sample window,
// using the same add/subtract adder as the correlators but with the sample's
// own sign bit in place of the ROM bit (a positive sample is added, a
// negative one subtracted).  At the end of the window the sum L is held
// for the whole next window.  Two values are derived from the held sum:
//   level_o  L > MIN_LEVEL, from a cascaded 20-bit magnitude comparator;
//            it tells a tone or speech from a pause.
//   power_o  P = c * L, the threshold that a correlator maximum must exceed;
//            c is chosen with s0/s1 as a sum of two shifted copies of L:
//              s0 s1 : 0 0 -> 3/8, 0 1 -> 1/2, 1 0 -> 5/8, 1 1 -> 3/4.
// The add/subtract accumulation, the comparator and the multiplier table
// follow the design description.  MIN_LEVEL's default (2000) is the level
// threshold used by the design's algorithm model; the power data is kept
// at full width (the original shifted out only 16 bits of it serially).
//
// Timing: the sum is updated on the first step of each sample (step_en with
// fidx == 7); lsum_o, level_o and power_o change right after the update
// on the last sample of a window, i.e. before the correlators deliver that
// window's second finished sum.
module dtmf_level
  import dtmf_pkg::*;
#(
  parameter int unsigned MIN_LEVEL = 2000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step_en,
  input  fidx_t   fidx,
  input  sample_t x,
  input  logic    first,
  input  logic    last,
  input  logic    s0,
  input  logic    s1,
  output mag_t    lsum_o,    // held absolute sum of the last window
  output logic    level_o,   // lsum_o > MIN_LEVEL
  output mag_t    power_o    // c * lsum_o
);

  acc_t acc, prev, nxt, xe;
  logic upd;
  mag_t ta, tb;
  logic lgt, sgt;

  assign upd  = step_en && (fidx == fidx_t'(NFREQ - 1));
  assign xe   = acc_t'(x);
  assign prev = first ? '0 : acc;
  assign nxt  = x[DIN_W-1] ? prev - xe : prev + xe;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc    <= '0;
      lsum_o <= '0;
    end else if (upd) begin
      acc <= nxt;
      if (last) lsum_o <= mag_t'(nxt);
    end
  end

  // level comparator
  dtmf_magcmp #(.W(ACC_W)) u_cmp (
    .a      (lsum_o),
    .b      (mag_t'(MIN_LEVEL)),
    .a_gt_o (lgt),
    .b_gt_o (sgt)
  );
  assign level_o = lgt;

  // power data: c * L with c from the select inputs
  assign ta      = s0 ? (lsum_o >> 1) : (lsum_o >> 2);
  assign tb      = s1 ? (lsum_o >> 2) : (lsum_o >> 3);
  assign power_o = ta + tb;

endmodule
