// dtmf_testpow: serial test output of the level value.
//
// When load is high the held absolute sum of a window is copied into a
// shift register; on every following enable the register shifts left and
// its most significant bit appears on ser_o, so the 20-bit level value
// leaves the chip MSB first on one pin.  frame_o is high while bits of a
// loaded value are being sent (20 enables).  The serialising function
// follows the design description; the MSB-first order and the frame
// signal are this implementation's choices.
module dtmf_testpow
  import dtmf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic shift_en,
  input  mag_t lsum,
  output logic ser_o,
  output logic frame_o
);

  mag_t       sh;
  logic [4:0] cnt;   // bits still to be sent

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh  <= '0;
      cnt <= '0;
    end else if (load) begin
      sh  <= lsum;
      cnt <= 5'(ACC_W);
    end else if (shift_en && cnt != '0) begin
      sh  <= sh << 1;
      cnt <= cnt - 5'd1;
    end
  end

  assign ser_o   = sh[ACC_W-1];
  assign frame_o = (cnt != '0);

endmodule
