// tb_dtmf_testmux: checks that every select code routes its group of four
// nodes (or zero beyond the sixth group) for random node values.
module tb_dtmf_testmux;
  logic [23:0] nodes;
  logic [2:0] sel;
  logic [3:0] tst;
  int checks = 0, failures = 0;

  dtmf_testmux dut (.nodes, .sel, .tst_o(tst));

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [3:0] e;
      nodes = 24'($urandom);
      sel = 3'(i % 8);
      #1;
      e = (sel < 6) ? nodes[4 * sel +: 4] : 4'd0;
      checks++;
      if (tst !== e) begin
        failures++;
        $display("FAIL: sel %0d gave %h, expected %h", sel, tst, e);
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
