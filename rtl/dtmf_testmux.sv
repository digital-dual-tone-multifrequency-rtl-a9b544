// dtmf_testmux: test multiplexer for internal nodes.
//
// Three select inputs choose one group of four internal signals out of
// NGRP groups (24 signals for the default six groups) and drive them to the
// four test output pins.  Select codes beyond the last group output zero.
// The multiplexing of internal nodes to test pins follows the design
// description; which signal sits in which group is decided by the
// instantiating module.  Purely combinational.
module dtmf_testmux #(
  parameter int unsigned NGRP = 6
) (
  input  logic [4*NGRP-1:0] nodes,   // group g is nodes[4*g +: 4]
  input  logic [2:0]        sel,
  output logic [3:0]        tst_o
);

  always_comb begin
    tst_o = '0;
    for (int g = 0; g < NGRP; g++)
      if (int'(sel) == g) tst_o = nodes[4*g +: 4];
  end

endmodule
