// tb_dtmf_corr: checks one correlator against a reference model.  A local
// sequencer plays the part of the ROM: eight steps per sample, 100 samples
// per window, random sign bits and random 13-bit samples (including the
// extremes).  The model keeps eight integer sums; in the last sample of
// each window the correlator's finished sum for every frequency must match,
// and done_o must be high exactly then.  Three windows are run so that the
// clearing at the window start is checked as well.
module tb_dtmf_corr;
  import dtmf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, step_en = 1'b0;
  sample_t x = '0;
  logic z = 1'b0, first = 1'b0, last = 1'b0;
  acc_t sum_o;
  logic done_o;
  int checks = 0, failures = 0;
  int model [8];

  dtmf_corr dut (.clk, .rst_n, .step_en, .x, .z, .first, .last, .sum_o, .done_o);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int ndone = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 3; w++)
      for (int n = 0; n < 100; n++) begin
        int xv;
        case ($urandom_range(0, 9))
          0:       xv = -4096;
          1:       xv = 4095;
          default: xv = int'($urandom_range(0, 8191)) - 4096;
        endcase
        for (int s = 0; s < 8; s++) begin
          @(negedge clk);
          x = 13'(xv);
          z = 1'($urandom);
          first = (n == 0);
          last = (n == 99);
          step_en = 1'b1;
          if (n == 0) model[s] = 0;
          model[s] += z ? xv : -xv;
          #1;
          chk(done_o == last, "done_o");
          if (last) begin
            chk(int'(sum_o) == model[s], $sformatf("window %0d freq slot %0d: %0d, expected %0d", w, s, sum_o, model[s]));
            ndone++;
          end
          @(negedge clk) step_en = 1'b0;
        end
      end
    chk(ndone == 24, "number of finished sums");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
