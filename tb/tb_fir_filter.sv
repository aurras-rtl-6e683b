// tb_fir_filter: random 7-tap filter and random inputs; every output is
// compared with a direct evaluation of the FIR sum, and must appear exactly
// NTAPS+1 clocks after its input.
module tb_fir_filter;
  import aurras_pkg::*;
  localparam int unsigned NTAPS = 7;
  localparam int unsigned FRAC  = 12;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid, busy;
  sample_t in_sample = '0, out_sample;
  logic signed [15:0] coefs [NTAPS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fir_filter #(.NTAPS(NTAPS), .COEF_FRAC(FRAC)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int hist [NTAPS];

  initial begin
    longint acc;
    int lat, expv;
    for (int k = 0; k < NTAPS; k++) begin
      coefs[k] = 16'($urandom_range(16383) - 8192);
      hist[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'($urandom_range(65535)) - 32768;
      if (n % 20 == 3) hist[0] = 32767;
      acc = 0;
      for (int k = 0; k < NTAPS; k++) acc += longint'(hist[k]) * longint'(coefs[k]);
      acc = acc >>> FRAC;
      expv = (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : int'(acc);
      @(negedge clk);
      in_sample = sample_t'(hist[0]);
      in_valid  = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      check(lat == NTAPS + 1, $sformatf("latency %0d", lat));
      check(out_sample == sample_t'(expv), $sformatf("n=%0d out %0d expected %0d", n, out_sample, expv));
      repeat ($urandom_range(4)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
