// tb_dtmf_timing: checks the clock divider.  After reset, step_en must be
// high on every 16th cycle (cycles 15, 31, ...) and sample_en on every
// 128th (cycle 127, 255, ...), always together with a step_en; the two
// square-wave outputs must have periods of 16 and 128 cycles.
module tb_dtmf_timing;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step_en, sample_en, rom_clk, smp_clk;
  int checks = 0, failures = 0;

  dtmf_timing dut (.clk, .rst_n, .step_en, .sample_en, .rom_clk, .smp_clk);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int n_step = 0, n_smp = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 128 * 6; c++) begin
      @(negedge clk);
      chk(step_en == ((c % 16) == 15), $sformatf("step_en at cycle %0d", c));
      chk(sample_en == ((c % 128) == 127), $sformatf("sample_en at cycle %0d", c));
      chk(rom_clk == ((c % 16) >= 8), $sformatf("rom_clk at cycle %0d", c));
      chk(smp_clk == ((c % 128) >= 64), $sformatf("smp_clk at cycle %0d", c));
      n_step += step_en;
      n_smp  += sample_en;
      @(posedge clk);
    end
    chk(n_step == 48 && n_smp == 6, "enable counts over 768 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
