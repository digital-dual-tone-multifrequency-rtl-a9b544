// dtmf_timing: clock division for the DTMF receiver.
//
// The chip runs from a 1024 kHz master clock.  One counter divides it by
// 16 to give the ROM/correlator step rate (64 kHz, eight steps per input
// sample) and, through a further divide-by-8, by 128 to give the 8 kHz
// input latch rate.  Instead of producing gated or divided clocks, as the
// original divider chain did, this block issues single-cycle enables that
// the rest of the design uses on the one master clock; the divided clocks
// themselves are also brought out as 50 % square waves for test.
//
// Timing: step_en is high on the last cycle of every 16-cycle period,
// sample_en on the last cycle of every 128-cycle period (together with the
// eighth step_en of that period).  Synchronous active-low reset.
module dtmf_timing (
  input  logic clk,
  input  logic rst_n,
  output logic step_en,     // 64 kHz ROM / correlator step enable
  output logic sample_en,   // 8 kHz input latch enable
  output logic rom_clk,     // 64 kHz square wave (test)
  output logic smp_clk      // 8 kHz square wave (test)
);

  logic [3:0] div16;  // first stage, divides by 16
  logic [2:0] div8;   // second stage, divides by 8

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div16 <= '0;
      div8  <= '0;
    end else begin
      div16 <= div16 + 4'd1;
      if (div16 == 4'hF) div8 <= div8 + 3'd1;
    end
  end

  assign step_en   = (div16 == 4'hF);
  assign sample_en = step_en && (div8 == 3'd7);
  assign rom_clk   = div16[3];
  assign smp_clk   = div8[2];

  // a sample enable always coincides with the eighth step of its period
  a_sample_on_step: assert property (@(posedge clk) disable iff (!rst_n)
                                     sample_en |-> step_en);

endmodule
