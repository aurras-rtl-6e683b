// tb_delay_line: random samples with the delay changed every 50 samples
// (including 0, 24 and DEPTH-1); each output must be x[n - delay] (0 before
// the first sample) and appear 3 clocks after its input.
module tb_delay_line;
  import aurras_pkg::*;
  localparam int unsigned DEPTH = 64, AW = 6;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic [AW-1:0] delay = '0;
  sample_t in_sample = '0, out_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  delay_line #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int x [$];
  int delays [6] = '{24, 0, 63, 1, 37, 24};

  initial begin
    int lat, e, idx;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      delay = AW'(delays[n / 50]);
      @(negedge clk);
      in_sample = sample_t'($urandom);
      in_valid = 1'b1;
      x.push_back(int'(in_sample));
      @(negedge clk);
      in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("latency %0d", lat));
      idx = n - int'(delay);
      if (idx >= 0) e = x[idx];
      else          e = 0;
      check(out_sample == sample_t'(e), $sformatf("n=%0d d=%0d out %0d expected %0d", n, delay, out_sample, sample_t'(e)));
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
