// tb_phase_correction: after reset the filter must be the identity; then a
// random 8-tap coefficient set is loaded through the write port and every
// output is compared with the directly computed FIR sum (14 fractional bits,
// saturated), with NTAPS+1 clocks of latency.
module tb_phase_correction;
  import aurras_pkg::*;
  localparam int unsigned NTAPS = 8, CAW = 3;
  logic clk = 1'b0, rst = 1'b1, coef_we = 1'b0, in_valid = 1'b0, out_valid;
  logic [CAW-1:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  sample_t in_sample = '0, out_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  phase_correction #(.NTAPS(NTAPS)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int c [NTAPS];
  int hist [NTAPS];

  task automatic run(input int n);
    longint acc;
    int lat, e;
    for (int i = 0; i < n; i++) begin
      for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'($urandom_range(40000)) - 20000;
      acc = 0;
      for (int k = 0; k < NTAPS; k++) acc += longint'(hist[k]) * c[k];
      acc = acc >>> 14;
      e = (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : int'(acc);
      @(negedge clk); in_sample = sample_t'(hist[0]); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 50) begin @(negedge clk); lat++; end
      check(lat == NTAPS + 1, $sformatf("latency %0d", lat));
      check(out_sample == sample_t'(e), $sformatf("out %0d expected %0d", out_sample, e));
    end
  endtask

  initial begin
    for (int k = 0; k < NTAPS; k++) begin c[k] = (k == 0) ? 16384 : 0; hist[k] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(20);
    for (int k = 0; k < NTAPS; k++) begin
      c[k] = int'($urandom_range(16000)) - 8000;
      @(negedge clk); coef_we = 1'b1; coef_addr = CAW'(k); coef_data = 16'(c[k]);
    end
    @(negedge clk); coef_we = 1'b0;
    run(100);
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
