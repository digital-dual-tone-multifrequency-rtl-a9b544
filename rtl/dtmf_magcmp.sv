// dtmf_magcmp: unsigned magnitude comparator made of cascaded 2-bit cells.
//
// Each cell compares two bits of A and two bits of B and merges the result
// with the decision already taken by the more significant cells: a_gt_o
// ("Cout") is high when A is larger, b_gt_o ("Dout") when B is larger, both
// low when they are equal.  A decision made higher up is passed down
// unchanged.  The width W (20 in the receiver's level comparator) must be
// even.  The cascaded-cell structure follows the design description; the
// logic inside a cell is written here as plain boolean equations.
//
// Purely combinational.
module dtmf_magcmp #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         a_gt_o,
  output logic         b_gt_o
);

  localparam int unsigned NCELL = W / 2;

  // c[i] / d[i]: "A larger" / "B larger" entering cell i from above.
  logic [NCELL:0] c, d;

  assign c[NCELL] = 1'b0;
  assign d[NCELL] = 1'b0;

  for (genvar i = NCELL - 1; i >= 0; i--) begin : g_cell
    logic [1:0] ab, bb;
    logic       agt, bgt;
    assign ab  = a[2*i +: 2];
    assign bb  = b[2*i +: 2];
    // local 2-bit comparison
    assign agt = (ab[1] & ~bb[1]) | (~(ab[1] ^ bb[1]) & ab[0] & ~bb[0]);
    assign bgt = (bb[1] & ~ab[1]) | (~(ab[1] ^ bb[1]) & bb[0] & ~ab[0]);
    assign c[i] = c[i+1] | (~d[i+1] & agt);
    assign d[i] = d[i+1] | (~c[i+1] & bgt);
  end

  assign a_gt_o = c[0];
  assign b_gt_o = d[0];

  initial assert (W % 2 == 0) else $error("dtmf_magcmp: W must be even");

endmodule
