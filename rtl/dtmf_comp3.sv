// dtmf_comp3: maximum of the absolute values of three correlator sums.
//
// The three sums of one frequency (phases 0, pi/3 and 2*pi/3) are made
// positive and the largest is returned.  As in the original circuit the
// absolute value of a negative number is formed by inverting its bits, so
// it comes out one less than the true magnitude; this saves the increment
// and is negligible against the thresholds used.  The first two values are
// compared, then the larger of them with the third.  The original did this
// bit-serially over two clock periods; here it is combinational.
module dtmf_comp3
  import dtmf_pkg::*;
(
  input  acc_t a0,
  input  acc_t a1,
  input  acc_t a2,
  output mag_t max_o
);

  function automatic mag_t abs_ones(acc_t v);
    return v[ACC_W-1] ? ~mag_t'(v) : mag_t'(v);
  endfunction

  mag_t m0, m1, m2, m01;

  assign m0    = abs_ones(a0);
  assign m1    = abs_ones(a1);
  assign m2    = abs_ones(a2);
  assign m01   = (m0 >= m1) ? m0 : m1;
  assign max_o = (m01 >= m2) ? m01 : m2;

endmodule
