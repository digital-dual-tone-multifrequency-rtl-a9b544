// tb_dtmf_detect: checks the detection part against a window-level model.
//
// Drives dual tones, single tones, noise and silence into the detector,
// a new sample right after each input latch.  The model records each
// latched sample, forms windows the way the detector does (the first
// window starts with the reset value of the input register), correlates
// them with sign(sin()) references computed in floating point, takes the
// maximum of the approximate magnitudes (negative sums count one less),
// and compares it with the selected fraction of the magnitude sum.  Every
// window result (level, valid, number) and every per-frequency maximum
// must match, result pulses must come exactly 12800 cycles apart (100
// samples of 128 clocks), and the tone windows must decode to the key
// played.
module tb_dtmf_detect;
  import dtmf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, s0 = 1'b0, s1 = 1'b1;
  sample_t din = '0;
  win_result_t res_o;
  logic res_en_o, step_en_o, sample_en_o, rom_clk_o, smp_clk_o, first_o, done_o, level_o, cmp_o;
  logic pow_ser_o, pow_frame_o;
  logic [2:0] z_o, corr_sign_o;
  logic [7:0] flags_o;
  mag_t maxes_o [8];
  int checks = 0, failures = 0;

  dtmf_detect dut (.clk, .rst_n, .din, .s0, .s1, .res_o, .res_en_o, .step_en_o, .sample_en_o,
                   .rom_clk_o, .smp_clk_o, .z_o, .first_o, .corr_sign_o, .done_o, .level_o,
                   .cmp_o, .pow_ser_o, .pow_frame_o, .flags_o, .maxes_o);

  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam real FR [8] = '{697.0, 770.0, 852.0, 941.0, 1209.0, 1336.0, 1477.0, 1633.0};

  int lat [$];          // latched samples, in order
  int win_key [$];      // key played during each window's samples, -1 if none
  int cur_key = -1;
  longint unsigned cyc = 0, last_res = 0;
  int nres = 0, n_decoded = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // signal source: segments of (low freq, high freq, amplitudes, noise)
  real fa = 0.0, fb = 0.0, aa = 0.0, ab = 0.0;
  int noise = 0, nsmp = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sample_en_o) begin
      real v;
      int iv;
      lat.push_back(int'(din));
      // next sample
      v = aa * $sin(2.0 * PI * fa * nsmp / 8000.0 + 0.3) + ab * $sin(2.0 * PI * fb * nsmp / 8000.0 + 1.1);
      iv = $rtoi(v) + ((noise > 0) ? int'($urandom_range(0, 2 * noise)) - noise : 0);
      if (iv > 4095) iv = 4095;
      if (iv < -4096) iv = -4096;
      din <= 13'(iv);
      nsmp++;
    end
  end

  // model of one window
  task automatic check_window(input int w);
    int xs [100];
    int l, p, mx, lo_n, hi_n, lo_i, hi_i;
    bit flags [8];
    for (int n = 0; n < 100; n++) begin
      int idx;
      idx = w * 100 + n - 1;
      xs[n] = (idx < 0) ? 0 : lat[idx];
    end
    l = 0;
    foreach (xs[n]) l += (xs[n] < 0) ? -xs[n] : xs[n];
    p = (l >> 2) + (l >> 2);       // s0 = 0, s1 = 1: one half
    lo_n = 0; hi_n = 0; lo_i = 0; hi_i = 0;
    for (int f = 0; f < 8; f++) begin
      mx = 0;
      for (int k = 0; k < 3; k++) begin
        int c, a;
        c = 0;
        for (int n = 0; n < 100; n++)
          c += ($sin(2.0 * PI * FR[f] * (real'(n) - 49.5) / 8000.0 + real'(k) * PI / 3.0) >= 0.0) ? xs[n] : -xs[n];
        a = (c < 0) ? -c - 1 : c;
        if (a > mx) mx = a;
      end
      chk(int'(maxes_o[f]) == mx, $sformatf("window %0d freq %0d max %0d, expected %0d", w, f, maxes_o[f], mx));
      flags[f] = (mx > p);
      if (flags[f]) begin
        if (f < 4) begin lo_n++; lo_i = f; end else begin hi_n++; hi_i = f - 4; end
      end
    end
    chk(res_o.level == (l > 2000), $sformatf("window %0d level", w));
    chk(res_o.valid == (lo_n == 1 && hi_n == 1), $sformatf("window %0d valid", w));
    if (lo_n == 1 && hi_n == 1)
      chk(res_o.num == {2'(lo_i), 2'(hi_i)}, $sformatf("window %0d number", w));
    if (w < win_key.size() && win_key[w] >= 0) begin
      chk(res_o.valid && res_o.level && res_o.num == 4'(win_key[w]), $sformatf("window %0d key %0d not decoded", w, win_key[w]));
      n_decoded++;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && res_en_o) begin
      if (nres > 0) chk(cyc - last_res == 12800, $sformatf("result spacing %0d", cyc - last_res));
      last_res <= cyc;
      check_window(nres);
      nres <= nres + 1;
    end
  end

  task automatic segment(input int key, input real a, input real b, input int nz, input int windows);
    if (key >= 0) begin fa = FR[key / 4]; fb = FR[4 + key % 4]; end
    aa = a; ab = b; noise = nz;
    // the windows fully covered by this segment
    repeat (windows * 100) @(posedge sample_en_o);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    // windows lying fully inside a tone (see the segment lengths below)
    repeat (16) win_key.push_back(-1);
    win_key[2] = 5;
    win_key[3] = 5;
    win_key[7] = 14;
    win_key[8] = 14;
    #1 rst_n = 1'b1;
    segment(-1, 0.0, 0.0, 0, 1);          // silence (window 0)
    segment(5, 1000.0, 1000.0, 0, 3);     // key 5 (row 1, col 1)
    segment(-1, 0.0, 0.0, 20, 2);         // weak noise
    segment(14, 1200.0, 800.0, 30, 3);    // '#' row 3 col 2, twisted, noisy
    fb = 1336.0;
    segment(-1, 1500.0, 0.0, 0, 2);       // single low tone
    segment(-1, 0.0, 0.0, 2000, 2);       // strong noise
    repeat (200) @(posedge sample_en_o);
    chk(nres >= 13, $sformatf("only %0d results", nres));
    chk(n_decoded == 4, "tone windows decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
