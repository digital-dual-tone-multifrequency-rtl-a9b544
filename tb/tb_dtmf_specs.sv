// tb_dtmf_specs: runs the receiving specifications for push-button
// signals through the complete receiver at its default parameters and
// reports, for each case, how many of four trials (different keys, random
// tone phases, random alignment to the correlation windows) were accepted.
// Tones are 1000 LSB per tone unless twisted.
//   frequency tolerance: both tones shifted by -3.5 .. +3.5 %
//   signal duration    : 23, 24, 40 and 60 ms tones
//   pause duration     : 30, 40 and 60 ms pauses between two equal keys
//   twist              : high tone +4 .. -8 dB relative to the low tone
// with the power fraction 1/2 and, for twist and the 3 % points, 3/8.
// Checked (every trial must agree), with the fraction 1/2: acceptance
// within +-1.8 %, rejection at +-3.5 %, rejection of 23 and
// 24 ms tones, acceptance of 60 ms tones and of a second equal key after
// a 60 ms pause; with 3/8: acceptance of +4 dB and -5 dB twist.
// All other cases are reported only, being accepted in some trials or
// none: the +-3 % points, 40 ms tones (three whole windows fit in 40 ms
// only for some alignments), 30 and 40 ms pauses (likewise), and twist at 1/2 or beyond
// -5 dB.
module tb_dtmf_specs;
  logic clk = 1'b0, rst_n = 1'b0, resdigav_n = 1'b1;
  logic s0 = 1'b0, s1 = 1'b1;   // power fraction 1/2 unless a case says otherwise
  logic [12:0] datin = '0;
  logic [3:0] button, tstout;
  logic digitav, inplatclktest, romcktest;
  int checks = 0, failures = 0;

  dtmf_receiver dut (.clk, .rst_n, .datin, .resdigav_n, .s0, .s1,
                     .s0tst(1'b0), .s1tst(1'b0), .s2tst(1'b0), .button, .digitav,
                     .inplatclktest, .romcktest, .tstout);

  always #488 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam real LOWF [4]  = '{697.0, 770.0, 852.0, 941.0};
  localparam real HIGHF [4] = '{1209.0, 1336.0, 1477.0, 1633.0};
  localparam int NTRIAL = 4;

  int n_acc = 0;
  always @(posedge clk) if (dut.u_decision.accept_o) n_acc++;

  task automatic play(input real f1, input real a1, input real f2, input real a2, input int nsamp);
    real p1, p2, v;
    int iv;
    p1 = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    p2 = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    for (int n = 0; n < nsamp; n++) begin
      v  = a1 * $sin(2.0 * PI * f1 * n / 8000.0 + p1) + a2 * $sin(2.0 * PI * f2 * n / 8000.0 + p2);
      iv = $rtoi(v);
      @(negedge clk) datin = 13'(iv);
      repeat (127) @(negedge clk);
    end
  endtask

  task automatic quiet(input int nsamp);
    @(negedge clk) datin = '0;
    repeat (128 * nsamp - 1) @(negedge clk);
  endtask

  // one trial: random offset, tone(s), long pause; returns number of digits accepted
  task automatic trial(input int key, input real dev, input real a_hi_db, input int tone_smp,
                       input int pause_smp, input int ntones, output int acc);
    int a0;
    real fl, fh, ah;
    fl = LOWF[key / 4] * (1.0 + dev);
    fh = HIGHF[key % 4] * (1.0 + dev);
    ah = 1000.0 * $pow(10.0, a_hi_db / 20.0);
    quiet($urandom_range(0, 99));
    a0 = n_acc;
    for (int t = 0; t < ntones; t++) begin
      play(fl, 1000.0, fh, ah, tone_smp);
      quiet((t == ntones - 1) ? 500 : pause_smp);
    end
    acc = n_acc - a0;
  endtask

  task automatic run_case(input string name, input real dev, input real db, input int tone_smp,
                          input int pause_smp, input int ntones, input int expect_all);
    int tot, acc;
    tot = 0;
    for (int i = 0; i < NTRIAL; i++) begin
      trial((i * 5 + 3) % 16, dev, db, tone_smp, pause_smp, ntones, acc);
      tot += acc;
    end
    $display("case %-28s : %0d of %0d digits accepted", name, tot, NTRIAL * ntones);
    if (expect_all >= 0) begin
      checks++;
      if (tot != expect_all * NTRIAL * ntones) begin
        failures++;
        $display("FAIL: %s", name);
      end
    end
  endtask

  initial begin
    repeat (20) @(negedge clk);
    rst_n = 1'b1;
    quiet(200);
    // frequency tolerance
    run_case("frequency -3.5 %", -0.035, 0.0, 480, 0, 1, 0);
    run_case("frequency -3.0 %", -0.030, 0.0, 480, 0, 1, -1);
    run_case("frequency -1.8 %", -0.018, 0.0, 480, 0, 1, 1);
    run_case("frequency -1.5 %", -0.015, 0.0, 480, 0, 1, 1);
    run_case("frequency  0 %",    0.0,   0.0, 480, 0, 1, 1);
    run_case("frequency +1.5 %",  0.015, 0.0, 480, 0, 1, 1);
    run_case("frequency +1.8 %",  0.018, 0.0, 480, 0, 1, 1);
    run_case("frequency +3.0 %",  0.030, 0.0, 480, 0, 1, -1);
    run_case("frequency +3.5 %",  0.035, 0.0, 480, 0, 1, 0);
    // signal duration
    run_case("duration 23 ms", 0.0, 0.0, 184, 0, 1, 0);
    run_case("duration 24 ms", 0.0, 0.0, 192, 0, 1, 0);
    run_case("duration 40 ms", 0.0, 0.0, 320, 0, 1, -1);
    run_case("duration 60 ms", 0.0, 0.0, 480, 0, 1, 1);
    // pause between two equal keys
    run_case("pause 30 ms", 0.0, 0.0, 480, 240, 2, -1);
    run_case("pause 40 ms", 0.0, 0.0, 480, 320, 2, -1);
    run_case("pause 60 ms", 0.0, 0.0, 480, 480, 2, 1);
    // twist
    run_case("twist high +4 dB", 0.0, 4.0, 480, 0, 1, -1);
    run_case("twist high -4 dB", 0.0, -4.0, 480, 0, 1, -1);
    run_case("twist high -5 dB", 0.0, -5.0, 480, 0, 1, -1);
    run_case("twist high -8 dB", 0.0, -8.0, 480, 0, 1, -1);
    {s0, s1} = 2'b00;   // 3/8
    run_case("3/8: twist high +4 dB", 0.0, 4.0, 480, 0, 1, 1);
    run_case("3/8: twist high -5 dB", 0.0, -5.0, 480, 0, 1, 1);
    run_case("3/8: twist high -8 dB", 0.0, -8.0, 480, 0, 1, -1);
    run_case("3/8: frequency -3.0 %", -0.030, 0.0, 480, 0, 1, -1);
    run_case("3/8: frequency +3.0 %",  0.030, 0.0, 480, 0, 1, -1);
    run_case("3/8: frequency +3.5 %",  0.035, 0.0, 480, 0, 1, -1);
    {s0, s1} = 2'b01;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
