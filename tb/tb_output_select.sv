// tb_output_select: random source values under every switch combination;
// checks the priority (tone, calibration mic, input mic, monitor, anti-noise),
// the negation of the anti-noise including the -32768 corner, and the one
// clock of latency.
module tb_output_select;
  import aurras_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [8:3] sw = '0;
  sample_t anti_src = '0, in_mic = '0, cal_mic = '0, tone = '0, monitor = '0, out_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  output_select dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int e;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      sw = 6'(n % 64);
      anti_src = (n % 50 == 7) ? 16'sh8000 : sample_t'($urandom);
      in_mic = sample_t'($urandom); cal_mic = sample_t'($urandom);
      tone = sample_t'($urandom); monitor = sample_t'($urandom);
      if (sw[5])      e = tone;
      else if (sw[4]) e = cal_mic;
      else if (sw[3]) e = in_mic;
      else if (sw[6]) e = monitor;
      else            e = (anti_src == 16'sh8000) ? 32767 : -int'(anti_src);
      @(negedge clk);
      check(out_sample == sample_t'(e), $sformatf("sw=%b out %0d expected %0d", sw, out_sample, e));
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
