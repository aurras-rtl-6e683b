// tb_test_tone: counts ticks and checks the square wave: +AMPLITUDE for 24
// ticks, -AMPLITUDE for 24, repeating (500 Hz at 24 kHz).
module tb_test_tone;
  import aurras_pkg::*;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0;
  sample_t tone;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  test_tone #(.PERIOD(48), .AMPLITUDE(16'sd4096)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      check(tone == (((n % 48) < 24) ? 16'sd4096 : -16'sd4096), $sformatf("tick %0d: %0d", n, tone));
      @(negedge clk); tick = 1'b1;
      @(negedge clk); tick = 1'b0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
