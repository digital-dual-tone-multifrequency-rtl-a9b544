// tb_dtmf_level: checks level detection against a reference model.  A
// local sequencer supplies eight steps per sample (fidx 7..0) and 100
// samples per window.  Each window uses random samples of a random
// amplitude, some below and some above the minimum level.  After the
// window's last sample the held sum must equal the sum of |x|, level_o
// must equal (sum > MIN_LEVEL), and power_o must be the fraction selected
// by s0/s1, all four of which are used.  The held sum must not change
// during the following window.
module tb_dtmf_level;
  import dtmf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, step_en = 1'b0;
  fidx_t fidx = '0;
  sample_t x = '0;
  logic first = 1'b0, last = 1'b0, s0 = 1'b0, s1 = 1'b0;
  mag_t lsum_o, power_o;
  logic level_o;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0;

  dtmf_level dut (.clk, .rst_n, .step_en, .fidx, .x, .first, .last, .s0, .s1,
                  .lsum_o, .level_o, .power_o);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int held;
    held = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 12; w++) begin
      int amp, sum;
      amp = (w % 3 == 0) ? 30 : (w % 3 == 1) ? 4095 : 400;
      if (w == 11) amp = 4096;
      sum = 0;
      for (int n = 0; n < 100; n++) begin
        int xv;
        xv = int'($urandom_range(0, 2 * amp)) - amp;
        if (xv > 4095) xv = 4095;
        sum += (xv < 0) ? -xv : xv;
        for (int s = 0; s < 8; s++) begin
          @(negedge clk);
          if (s == 0) x = 13'(xv);
          fidx = 3'(7 - s);
          first = (n == 0);
          last = (n == 99);
          step_en = 1'b1;
          @(negedge clk) step_en = 1'b0;
          if (n < 99) chk(int'(lsum_o) == held, "held sum stable during window");
        end
      end
      held = sum;
      {s0, s1} = 2'(w % 4);
      #1;
      chk(int'(lsum_o) == sum, $sformatf("window %0d sum %0d, expected %0d", w, lsum_o, sum));
      chk(level_o == (sum > 2000), $sformatf("window %0d level", w));
      begin
        int e;
        case (w % 4)
          0: e = (sum >> 2) + (sum >> 3);
          1: e = (sum >> 2) + (sum >> 2);
          2: e = (sum >> 1) + (sum >> 3);
          default: e = (sum >> 1) + (sum >> 2);
        endcase
        chk(int'(power_o) == e, $sformatf("window %0d power %0d, expected %0d", w, power_o, e));
      end
      if (level_o) n_hi++; else n_lo++;
    end
    chk(n_hi > 0 && n_lo > 0, "both level outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
