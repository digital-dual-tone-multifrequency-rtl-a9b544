// tb_dtmf_testpow: loads random 20-bit level values and checks that they
// come out MSB first, one bit per shift enable, with frame high for
// exactly 20 enables after the load.
module tb_dtmf_testpow;
  import dtmf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift_en = 1'b0;
  mag_t lsum = '0;
  logic ser_o, frame_o;
  int checks = 0, failures = 0;

  dtmf_testpow dut (.clk, .rst_n, .load, .shift_en, .lsum, .ser_o, .frame_o);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    chk(!frame_o, "frame low after reset");
    for (int t = 0; t < 20; t++) begin
      mag_t v;
      v = 20'($urandom);
      @(negedge clk) begin load = 1'b1; lsum = v; end
      @(negedge clk) load = 1'b0;
      for (int b = 19; b >= 0; b--) begin
        chk(frame_o, "frame high while sending");
        chk(ser_o == v[b], $sformatf("value %h bit %0d", v, b));
        repeat ($urandom_range(0, 2)) @(negedge clk);   // idle cycles
        shift_en = 1'b1;
        @(negedge clk) shift_en = 1'b0;
      end
      chk(!frame_o, "frame low after 20 bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
