// tb_dtmf_rom: checks the sign-bit ROM against sign(sin()) computed in
// floating point.  Steps the ROM every other cycle through two windows and
// checks, at each step, the frequency order (1633 Hz first, 697 Hz last),
// the sample index, the window markers first/last and the three sign bits
// sign(sin(2*pi*f*(n-49.5)/8000 + k*pi/3)).
module tb_dtmf_rom;
  import dtmf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, step_en = 1'b0;
  logic [2:0] z;
  fidx_t fidx;
  logic [6:0] sidx;
  logic first, last;
  int checks = 0, failures = 0;

  dtmf_rom dut (.clk, .rst_n, .step_en, .z, .fidx, .sidx, .first, .last);

  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam real FR [8] = '{697.0, 770.0, 852.0, 941.0, 1209.0, 1336.0, 1477.0, 1633.0};

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 2; w++)
      for (int n = 0; n < 100; n++)
        for (int s = 0; s < 8; s++) begin
          int f;
          f = 7 - s;
          @(negedge clk);
          chk(fidx == 3'(f), $sformatf("fidx %0d, expected %0d", fidx, f));
          chk(sidx == 7'(n), $sformatf("sidx %0d, expected %0d", sidx, n));
          chk(first == (n == 0) && last == (n == 99), "window markers");
          for (int k = 0; k < 3; k++) begin
            real v;
            v = $sin(2.0 * PI * FR[f] * (real'(n) - 49.5) / 8000.0 + real'(k) * PI / 3.0);
            chk(z[k] == (v >= 0.0), $sformatf("z[%0d] f=%0d n=%0d", k, f, n));
          end
          step_en = 1'b1;
          @(negedge clk) step_en = 1'b0;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
