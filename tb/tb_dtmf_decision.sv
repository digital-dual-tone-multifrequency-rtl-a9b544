// tb_dtmf_decision: checks the duration/pause logic against a reference
// model written from the rules: three equal valid windows, then three
// pause windows accept a digit; a window with high level whose maxima at
// the previous number's frequencies fell below 3/4 of the previous
// window's counts as a pause.  Window results are generated as a random
// mix of tones of random keys and lengths (1..6 windows), pauses
// (1..5 windows), invalid windows and ends of tones with dropped maxima;
// digitav is cleared at random through resdigav_n.  After every window the
// model's button, digitav, counters and accept pulse must match.  Counts
// of accepted digits, rejected short tones, saturations and drops are
// checked to be non-zero.
module tb_dtmf_decision;
  import dtmf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, res_en = 1'b0, resdigav_n = 1'b1;
  win_result_t res = '0;
  mag_t maxes [8];
  logic [3:0] button_o;
  logic digitav_o, accept_o, eq_o, drop_o;
  logic [1:0] durcount_o;
  logic [2:0] intcount_o;
  int checks = 0, failures = 0;

  dtmf_decision dut (.clk, .rst_n, .res_en, .res, .maxes, .resdigav_n, .button_o, .digitav_o,
                     .accept_o, .durcount_o, .intcount_o, .eq_o, .drop_o);

  always #5 clk = ~clk;

  // reference model state
  int m_prev = 0, m_dur = 0, m_int = 1, m_button = 0;
  bit m_prev_valid = 0, m_dav = 0;
  int m_pmax [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  int n_accept = 0, n_drop = 0, n_short = 0, n_dursat = 0;
  const int CODE [16] = '{1, 2, 3, 13, 4, 5, 6, 14, 7, 8, 9, 15, 11, 10, 12, 0};

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic window(input bit lvl, input bit vld, input int num, input int mx [8]);
    bit eff, drop, acc;
    int lo, hi;
    // model
    lo = m_prev / 4;
    hi = 4 + m_prev % 4;
    drop = lvl && m_prev_valid &&
           (mx[lo] < m_pmax[lo] / 2 + m_pmax[lo] / 4 || mx[hi] < m_pmax[hi] / 2 + m_pmax[hi] / 4);
    eff = lvl && !drop;
    acc = 0;
    if (eff) begin
      if (vld && m_prev_valid && num == m_prev) begin
        if (m_dur == 1) n_dursat++;
        m_dur = (m_dur < 2) ? m_dur + 1 : 2;
      end else begin
        if (m_dur == 1 && m_int == 1) n_short++;
        m_dur = 0;
      end
      m_int = 1;
      m_prev = num;
      m_prev_valid = vld;
    end else if (m_dur == 2 && m_int < 4) begin
      m_int++;
      if (m_int == 4) begin acc = 1; m_dav = 1; m_button = CODE[m_prev]; end
    end
    for (int i = 0; i < 8; i++) m_pmax[i] = mx[i];
    if (drop) n_drop++;
    if (acc) n_accept++;
    // drive
    @(negedge clk);
    res.level = lvl; res.valid = vld; res.num = 4'(num);
    for (int i = 0; i < 8; i++) maxes[i] = 20'(mx[i]);
    res_en = 1'b1;
    @(negedge clk) res_en = 1'b0;
    chk(accept_o == acc, "accept pulse");
    chk(digitav_o == m_dav, "digitav");
    chk(int'(durcount_o) == m_dur && int'(intcount_o) == m_int,
        $sformatf("counters %0d/%0d, expected %0d/%0d", durcount_o, intcount_o, m_dur, m_int));
    if (m_dav) chk(int'(button_o) == m_button, $sformatf("button %0d, expected %0d", button_o, m_button));
    repeat (3) @(negedge clk);
    if ($urandom_range(0, 5) == 0) begin
      resdigav_n = 1'b0;
      @(negedge clk) resdigav_n = 1'b1;
      m_dav = 0;
      chk(!digitav_o, "digitav cleared");
    end
  endtask

  task automatic tone_maxes(input int num, input int amp, output int mx [8]);
    for (int i = 0; i < 8; i++) mx[i] = $urandom_range(0, 3000);
    mx[num / 4] = amp + $urandom_range(0, 2000);
    mx[4 + num % 4] = amp + $urandom_range(0, 2000);
  endtask

  initial begin
    int mx [8];
    for (int i = 0; i < 8; i++) maxes[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int ev = 0; ev < 400; ev++) begin
      int kind, num, len;
      kind = $urandom_range(0, 9);
      num = $urandom_range(0, 15);
      if (kind < 5) begin                 // tone
        len = $urandom_range(1, 6);
        for (int i = 0; i < len; i++) begin
          tone_maxes(num, 50000, mx);
          window(1, 1, num, mx);
        end
        if ($urandom_range(0, 1)) begin   // tail window with dropped maxima
          tone_maxes(num, 20000, mx);
          window(1, $urandom_range(0, 1), num, mx);
        end
      end else if (kind < 8) begin        // pause
        len = $urandom_range(1, 5);
        for (int i = 0; i < len; i++) begin
          for (int j = 0; j < 8; j++) mx[j] = $urandom_range(0, 100);
          window(0, 0, 0, mx);
        end
      end else begin                      // speech-like invalid window
        for (int j = 0; j < 8; j++) mx[j] = $urandom_range(0, 60000);
        window(1, 0, num, mx);
      end
    end
    chk(n_accept > 0, "digits accepted");
    chk(n_drop > 0, "amplitude drops");
    chk(n_short > 0, "short tones cleared");
    chk(n_dursat > 0, "duration saturations");
    $display("accepted %0d, drops %0d, short %0d", n_accept, n_drop, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
