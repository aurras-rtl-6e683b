// tb_dc_blocker: feeds samples around a -900 baseline, checks that samples
// pass unchanged before calibration, that a calibration averages exactly
// 2**AVG_SHIFT samples (offset = floor(sum / 2**AVG_SHIFT)), and that later
// samples come out with that offset removed, one clock after they go in.
module tb_dc_blocker;
  import aurras_pkg::*;
  localparam int unsigned AVG_SHIFT = 4;

  logic clk = 1'b0, rst = 1'b1, calibrate = 1'b0, in_valid = 1'b0;
  sample_t in_sample = '0, out_sample, offset;
  logic out_valid, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dc_blocker #(.AVG_SHIFT(AVG_SHIFT)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int expected_offset = 0;

  // one sample, then look at the output one clock later
  task automatic send(input int v);
    int e;
    @(negedge clk);
    in_sample = sample_t'(v);
    in_valid  = 1'b1;
    @(negedge clk);
    in_valid  = 1'b0;
    check(out_valid, "out_valid one clock after in_valid");
    e = v - expected_offset;
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    check(out_sample == sample_t'(e), $sformatf("out %0d expected %0d", out_sample, e));
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int sum, v;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5; i++) send(-900 + int'($urandom_range(40)) - 20);
    repeat (2) begin
      // calibration: offset is taken from the next 2**AVG_SHIFT samples
      @(negedge clk); calibrate = 1'b1;
      @(negedge clk); calibrate = 1'b0;
      check(busy, "busy during calibration");
      sum = 0;
      for (int i = 0; i < (1 << AVG_SHIFT); i++) begin
        v = -900 + int'($urandom_range(200)) - 100;
        sum += v;
        send(v);      // still uses the old offset
      end
      check(!busy, "calibration ended");
      expected_offset = sum >>> AVG_SHIFT;
      check(offset == sample_t'(expected_offset),
            $sformatf("offset %0d expected %0d", offset, expected_offset));
      for (int i = 0; i < 20; i++) send(-900 + int'($urandom_range(2000)) - 1000);
    end
    // saturation at the top of the range
    send(32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
