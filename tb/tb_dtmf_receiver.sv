// tb_dtmf_receiver: end-to-end test of the DTMF receiver at its default
// parameters (also the full-size test: the receiver has no size parameter
// besides the minimum level).
//
// Generates dual-tone signals sample by sample, one new 13-bit sample every
// 128 clocks of the 1024 kHz clock (8 kHz), with random starting phases.
// Every one of the 16 keys must be reported with the right code on button
// and digitav high, 200 to 400 samples after the tone ends: three pause
// windows of 100 samples, the first of which may be the window in which the
// tone ended.  Then it checks the rejections: a 20 ms tone (too short), a
// single tone, a tone below the minimum level and a pair 6 % off in
// frequency.  Also exercised: the same key twice, twisted levels (about
// 4 dB apart, power fraction 3/8), digitav clearing through resdigav_n and the test
// multiplexer (its clock group against the clock pins, an unused code).
// In every step the power data is compared with the selected fraction of
// the magnitude sum.  Keys are received with the fractions 3/8, 1/2 and
// 5/8; 3/4 is exercised on a rejected signal, since it leaves too little
// margin for equal-level tones.  Each mechanism (level high/low windows,
// valid and invalid windows, duration counter saturation, interval counter
// saturation, acceptance, digitav clear, each power fraction, the
// amplitude-drop check) is counted, and one that never happened fails.
module tb_dtmf_receiver;
  import dtmf_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [12:0] datin = '0;
  logic resdigav_n = 1'b1;
  logic s0 = 1'b0, s1 = 1'b1;
  logic s0tst = 1'b0, s1tst = 1'b0, s2tst = 1'b0;
  logic [3:0] button;
  logic digitav;
  logic inplatclktest, romcktest;
  logic [3:0] tstout;

  dtmf_receiver dut (
    .clk (clk), .rst_n (rst_n), .datin (datin), .resdigav_n (resdigav_n),
    .s0 (s0), .s1 (s1), .s0tst (s0tst), .s1tst (s1tst), .s2tst (s2tst),
    .button (button), .digitav (digitav),
    .inplatclktest (inplatclktest), .romcktest (romcktest), .tstout (tstout)
  );

  always #488 clk = ~clk;   // ~1024 kHz (period in ns)

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int n_lvl_hi = 0, n_lvl_lo = 0, n_valid = 0, n_invalid = 0;
  int n_dur_sat = 0, n_int_sat = 0, n_accept = 0, n_dav_clr = 0, n_drop = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    if (dut.res_en) begin
      if (dut.res.level) begin
        n_lvl_hi++;
        if (dut.res.valid) n_valid++; else n_invalid++;
      end else n_lvl_lo++;
      n_mode[{s0, s1}]++;
      if (dut.u_decision.drop_o) n_drop++;
    end
    // power data = selected fraction of the held magnitude sum
    if (dut.u_detect.u_freqsel.step_en) begin
      logic [19:0] l, p;
      l = dut.u_detect.u_level.lsum_o;
      unique case ({s0, s1})
        2'b00: p = (l >> 2) + (l >> 3);
        2'b01: p = (l >> 2) + (l >> 2);
        2'b10: p = (l >> 1) + (l >> 3);
        2'b11: p = (l >> 1) + (l >> 2);
      endcase
      checks++;
      if (dut.u_detect.u_level.power_o !== p) begin
        failures++;
        $display("FAIL: power data %0d, expected %0d", dut.u_detect.u_level.power_o, p);
      end
    end
    if (dut.u_decision.res_en && dut.res.level && dut.u_decision.durcount_o == 2'd1
        && dut.res.valid && dut.u_decision.eq_o) n_dur_sat++;
    if (dut.u_decision.accept) n_int_sat++;
    if (dut.u_decision.accept_o) n_accept++;
    if (digitav && !resdigav_n) n_dav_clr++;
  end

  // ---------------- stimulus ----------------
  localparam real LOWF [4]  = '{697.0, 770.0, 852.0, 941.0};
  localparam real HIGHF [4] = '{1209.0, 1336.0, 1477.0, 1633.0};
  localparam real PI = 3.14159265358979;

  // one sample every 128 clocks, changed on the falling edge
  task automatic play(input real f1, input real a1, input real f2, input real a2, input int nsamp);
    real p1, p2, v;
    int iv;
    p1 = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    p2 = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    for (int n = 0; n < nsamp; n++) begin
      v  = a1 * $sin(2.0 * PI * f1 * n / 8000.0 + p1) + a2 * $sin(2.0 * PI * f2 * n / 8000.0 + p2);
      iv = $rtoi(v + (v >= 0.0 ? 0.5 : -0.5));
      if (iv > 4095) iv = 4095;
      if (iv < -4096) iv = -4096;
      @(negedge clk) datin = 13'(iv);
      repeat (127) @(negedge clk);
    end
  endtask

  task automatic silence(input int nsamp);
    @(negedge clk) datin = '0;
    repeat (128 * nsamp - 1) @(negedge clk);
  endtask

  function automatic logic [3:0] key_code(input int r, input int c);
    logic [3:0] t [16] = '{4'd1, 4'd2, 4'd3, 4'd13, 4'd4, 4'd5, 4'd6, 4'd14,
                           4'd7, 4'd8, 4'd9, 4'd15, 4'd11, 4'd10, 4'd12, 4'd0};
    return t[r * 4 + c];
  endfunction

  task automatic clear_dav();
    @(negedge clk) resdigav_n = 1'b0;
    @(negedge clk) resdigav_n = 1'b1;
    @(negedge clk);
    checks++;
    if (digitav) begin failures++; $display("FAIL: digitav not cleared"); end
  endtask

  // Tone, then pause; expect acceptance within the pause.
  task automatic key(input int r, input int c, input real a_lo, input real a_hi);
    longint unsigned t_end, t_av;
    bit seen;
    play(LOWF[r], a_lo, HIGHF[c], a_hi, 480);            // 60 ms tone
    t_end = cyc;
    seen = 0;
    @(negedge clk) datin = '0;
    for (int i = 0; i < 128 * 480; i++) begin
      @(negedge clk);
      if (digitav && !seen) begin seen = 1; t_av = cyc; end
    end
    checks++;
    if (!seen) begin
      failures++;
      $display("FAIL: key r%0d c%0d not detected", r, c);
    end else begin
      checks++;
      if (button !== key_code(r, c)) begin
        failures++;
        $display("FAIL: key r%0d c%0d gave code %0d, expected %0d", r, c, button, key_code(r, c));
      end
      checks++;
      if (t_av - t_end < 200 * 128 || t_av - t_end > 400 * 128 + 256) begin
        failures++;
        $display("FAIL: key r%0d c%0d detected %0d cycles after tone end", r, c, t_av - t_end);
      end
    end
    clear_dav();
  endtask

  // A signal that must not be accepted.
  task automatic reject(input string what, input real f1, input real a1, input real f2, input real a2, input int nsamp);
    play(f1, a1, f2, a2, nsamp);
    silence(480);
    checks++;
    if (digitav) begin
      failures++;
      $display("FAIL: %s was accepted (code %0d)", what, button);
      clear_dav();
    end
  endtask

  initial begin
    repeat (20) @(negedge clk);
    rst_n = 1'b1;
    silence(200);

    // all 16 keys, cycling through the four power fractions
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        {s0, s1} = 2'((r + c) % 3);
        key(r, c, 1000.0, 1000.0);
      end
    {s0, s1} = 2'b01;

    // same key twice in a row, and twisted levels
    {s0, s1} = 2'b00;
    key(1, 1, 1200.0, 760.0);
    key(1, 1, 1200.0, 760.0);
    key(2, 3, 660.0, 1000.0);
    {s0, s1} = 2'b01;

    // rejections
    reject("20 ms tone", LOWF[0], 1000.0, HIGHF[0], 1000.0, 160);
    reject("single tone", LOWF[2], 1500.0, HIGHF[0], 0.0, 480);
    {s0, s1} = 2'b11;
    reject("low-level tone", LOWF[1], 8.0, HIGHF[1], 8.0, 480);
    {s0, s1} = 2'b01;
    reject("6% off tone", LOWF[0] * 1.06, 1000.0, HIGHF[0] * 1.06, 1000.0, 480);

    // test multiplexer: group 5 carries the two clocks
    {s2tst, s1tst, s0tst} = 3'd5;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      checks++;
      if (tstout[3] !== romcktest || tstout[2] !== inplatclktest) begin
        failures++;
        $display("FAIL: test mux group 5 mismatch");
      end
    end
    {s2tst, s1tst, s0tst} = 3'd7;
    @(negedge clk);
    checks++;
    if (tstout !== 4'd0) begin failures++; $display("FAIL: test mux group 7 not zero"); end

    // every mechanism must have happened
    begin
      int cnt [13];
      string nm [13] = '{"level high", "level low", "valid", "invalid", "duration saturation",
                         "interval saturation", "accept", "digitav clear",
                         "mode 3/8", "mode 1/2", "mode 5/8", "mode 3/4", "amplitude drop"};
      cnt = '{n_lvl_hi, n_lvl_lo, n_valid, n_invalid, n_dur_sat, n_int_sat, n_accept, n_dav_clr,
              n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_drop};
      for (int i = 0; i < 13; i++) begin
        $display("mechanism %-20s : %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL: %s never happened", nm[i]); end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
