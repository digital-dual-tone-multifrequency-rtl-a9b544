// tb_dtmf_magcmp: checks the 20-bit cascaded comparator on edge cases and
// random operand pairs, including pairs that differ only in one low bit.
module tb_dtmf_magcmp;
  logic [19:0] a, b;
  logic agt, bgt;
  int checks = 0, failures = 0;

  dtmf_magcmp dut (.a(a), .b(b), .a_gt_o(agt), .b_gt_o(bgt));

  task automatic try(input logic [19:0] va, input logic [19:0] vb);
    a = va; b = vb;
    #1;
    checks++;
    if (agt !== (va > vb) || bgt !== (vb > va)) begin
      failures++;
      $display("FAIL: a=%0d b=%0d -> a_gt=%0d b_gt=%0d", va, vb, agt, bgt);
    end
  endtask

  initial begin
    try(0, 0); try(20'hFFFFF, 20'hFFFFF); try(0, 20'hFFFFF); try(20'hFFFFF, 0);
    try(20'h80000, 20'h7FFFF); try(1, 0); try(0, 1); try(2, 1); try(1, 2); try(3, 2);
    for (int i = 0; i < 3000; i++) begin
      logic [19:0] va, vb;
      va = 20'($urandom);
      vb = (i % 3 == 0) ? va ^ (20'd1 << $urandom_range(0, 19)) : 20'($urandom);
      if (i % 7 == 0) vb = va;
      try(va, vb);
    end
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
