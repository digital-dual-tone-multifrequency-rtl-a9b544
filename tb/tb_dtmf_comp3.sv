// tb_dtmf_comp3: checks the maximum of three approximate absolute values
// (a negative sum counts as |v| - 1) on edge cases and random sums.
module tb_dtmf_comp3;
  import dtmf_pkg::*;
  acc_t a0, a1, a2;
  mag_t mx;
  int checks = 0, failures = 0;

  dtmf_comp3 dut (.a0, .a1, .a2, .max_o(mx));

  function automatic int absm(input int v);
    return (v < 0) ? -v - 1 : v;
  endfunction

  task automatic try(input int v0, input int v1, input int v2);
    int e;
    a0 = 20'(v0); a1 = 20'(v1); a2 = 20'(v2);
    #1;
    e = absm(v0);
    if (absm(v1) > e) e = absm(v1);
    if (absm(v2) > e) e = absm(v2);
    checks++;
    if (int'(mx) != e) begin
      failures++;
      $display("FAIL: %0d %0d %0d -> %0d, expected %0d", v0, v1, v2, mx, e);
    end
  endtask

  initial begin
    try(0, 0, 0); try(-1, 0, 0); try(-5, 3, 4); try(5, -7, 6); try(1, 2, -409600);
    try(409600, -409600, 0); try(-524288, 524287, 0);
    for (int i = 0; i < 3000; i++)
      try(int'($urandom_range(0, 819200)) - 409600, int'($urandom_range(0, 819200)) - 409600,
          int'($urandom_range(0, 819200)) - 409600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
