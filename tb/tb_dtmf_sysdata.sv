// tb_dtmf_sysdata: checks all 16 entries of the key-code conversion.  The
// expected code is derived from the keypad layout (rows 697..941 Hz,
// columns 1209..1633 Hz) and the rule digit -> digit, 0 -> 10, * -> 11,
// # -> 12, A..C -> 13..15, D -> 0.
module tb_dtmf_sysdata;
  logic [3:0] num, code;
  int checks = 0, failures = 0;

  dtmf_sysdata dut (.num, .code);

  initial begin
    string keys = "123A456B789C*0#D";
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        byte k;
        int e;
        k = keys[r * 4 + c];
        case (k)
          "0": e = 10;
          "*": e = 11;
          "#": e = 12;
          "A": e = 13;
          "B": e = 14;
          "C": e = 15;
          "D": e = 0;
          default: e = k - "0";
        endcase
        num = {2'(r), 2'(c)};
        #1;
        checks++;
        if (int'(code) != e) begin
          failures++;
          $display("FAIL: key %c gave %0d, expected %0d", k, code, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
