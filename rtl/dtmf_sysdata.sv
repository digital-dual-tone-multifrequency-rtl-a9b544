// dtmf_sysdata: conversion of the detected number to the output code.
//
// The detected number is {low-group index, high-group index}; the output
// is the 4-bit key code read by the host processor: keys 1..9 give 1..9,
// 0 gives 10, * 11, # 12, A 13, B 14, C 15 and D 0.  The mapping is the
// design's conversion table; purely combinational.
module dtmf_sysdata (
  input  logic [3:0] num,    // {row (low group), column (high group)}
  output logic [3:0] code
);

  always_comb begin
    unique case (num)
      4'b0000: code = 4'd1;   // 1
      4'b0001: code = 4'd2;   // 2
      4'b0010: code = 4'd3;   // 3
      4'b0011: code = 4'd13;  // A
      4'b0100: code = 4'd4;   // 4
      4'b0101: code = 4'd5;   // 5
      4'b0110: code = 4'd6;   // 6
      4'b0111: code = 4'd14;  // B
      4'b1000: code = 4'd7;   // 7
      4'b1001: code = 4'd8;   // 8
      4'b1010: code = 4'd9;   // 9
      4'b1011: code = 4'd15;  // C
      4'b1100: code = 4'd11;  // *
      4'b1101: code = 4'd10;  // 0
      4'b1110: code = 4'd12;  // #
      4'b1111: code = 4'd0;   // D
    endcase
  end

endmodule
