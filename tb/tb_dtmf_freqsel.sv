// tb_dtmf_freqsel: checks frequency selection.  For each trial it plays the
// last sample of a window: eight steps with done high, fidx 7..0 and a
// maximum for each frequency, chosen above or below the power data, then
// one more step for the last comparison.  The result (one pulse of
// res_en_o) must report valid only when exactly one low-group and exactly
// one high-group frequency exceeded the power data, the number
// {low index, high index}, the level input, the eight flags and the eight
// maxima.  Trials cover valid pairs, empty groups, two flags in a group and
// values equal to the power data (not above it).
module tb_dtmf_freqsel;
  import dtmf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, step_en = 1'b0, done = 1'b0, level = 1'b0;
  fidx_t fidx = '0;
  mag_t max_i = '0, power = '0;
  win_result_t res_o;
  logic res_en_o, cmp_o;
  logic [7:0] flags_o;
  mag_t maxes_o [8];
  int checks = 0, failures = 0;
  int n_valid = 0, n_invalid = 0;

  dtmf_freqsel dut (.clk, .rst_n, .step_en, .done, .fidx, .max_i, .power, .level,
                    .res_o, .res_en_o, .flags_o, .maxes_o, .cmp_o);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic [7:0] want;
      mag_t mv [8];
      int npulse, lo, hi, ncl, nch;
      bit lv;
      power = 20'($urandom_range(1000, 200000));
      lv = 1'($urandom);
      case (t % 4)
        0, 1: begin  // one per group
          want = '0;
          want[$urandom_range(0, 3)] = 1'b1;
          want[4 + $urandom_range(0, 3)] = 1'b1;
        end
        default: want = 8'($urandom);
      endcase
      for (int f = 0; f < 8; f++) begin
        if (want[f]) mv[f] = power + 20'($urandom_range(1, 5000));
        else if (f == t % 8) mv[f] = power;                       // equal: not above
        else mv[f] = 20'($urandom_range(0, int'(power) - 1));
      end
      ncl = 0; nch = 0; lo = 0; hi = 0;
      for (int f = 0; f < 4; f++) begin
        if (want[f]) begin ncl++; lo = f; end
        if (want[f + 4]) begin nch++; hi = f; end
      end
      npulse = 0;
      // eight finished values, then one step to complete the pipeline
      for (int s = 0; s <= 8; s++) begin
        @(negedge clk);
        step_en = 1'b1;
        done = (s < 8);
        fidx = 3'(7 - (s % 8));
        max_i = (s < 8) ? mv[7 - s] : '0;
        level = lv;
        @(negedge clk) step_en = 1'b0;
        npulse += res_en_o;
        repeat (2) begin @(negedge clk); npulse += res_en_o; end
      end
      chk(npulse == 1, $sformatf("trial %0d: %0d result pulses", t, npulse));
      chk(flags_o == want, $sformatf("trial %0d: flags %b, expected %b", t, flags_o, want));
      chk(res_o.valid == (ncl == 1 && nch == 1), $sformatf("trial %0d: valid", t));
      if (ncl == 1 && nch == 1) begin
        chk(res_o.num == {2'(lo), 2'(hi)}, $sformatf("trial %0d: num %b", t, res_o.num));
        n_valid++;
      end else n_invalid++;
      chk(res_o.level == lv, "level passed through");
      for (int f = 0; f < 8; f++) chk(maxes_o[f] == mv[f], "stored maximum");
    end
    chk(n_valid > 0 && n_invalid > 0, "valid and invalid results seen");
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
