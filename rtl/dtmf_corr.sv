// dtmf_corr: one time-shared correlator (one reference phase, all eight
// frequencies).
//
// The input sample is multiplied by a ROM sign bit, which only means adding
// it or subtracting it, and added to the running sum of the current
// frequency.  The eight sums live in a register matrix of 8 x 20 bits that
// works as a circulating shift register: at every step the oldest sum is
// read at the tail, the updated sum is shifted in at the head, so after
// eight steps (one input sample) every frequency has been updated once.
// On the first sample of a window the sum read from the matrix is masked
// to zero (the "andarr" masking), which restarts the correlation every 100
// samples.  On the last sample the finished sum of each frequency is
// presented on sum_o with done_o high.
//
// Structure and widths follow the design description; the adder is a
// plain parallel adder (one per correlator, three in the receiver).
//
// Timing: one update per step_en.  sum_o is combinational from the matrix
// tail, the ROM bit and the input, valid while step_en is high.
module dtmf_corr
  import dtmf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step_en,
  input  sample_t x,        // current input sample
  input  logic    z,        // ROM sign bit, 1 = add, 0 = subtract
  input  logic    first,    // first sample of the window: clear the sum
  input  logic    last,     // last sample of the window: sum is final
  output acc_t    sum_o,    // updated sum of the current frequency
  output logic    done_o    // sum_o is a finished window sum
);

  acc_t mat [NFREQ];        // register matrix, mat[NFREQ-1] is the tail
  acc_t prev;
  acc_t xe;

  assign xe    = acc_t'(x);
  assign prev  = first ? '0 : mat[NFREQ-1];
  assign sum_o = z ? prev + xe : prev - xe;
  assign done_o = step_en && last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NFREQ; i++) mat[i] <= '0;
    end else if (step_en) begin
      mat[0] <= sum_o;
      for (int i = 1; i < NFREQ; i++) mat[i] <= mat[i-1];
    end
  end

endmodule
