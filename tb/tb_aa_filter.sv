// tb_aa_filter: checks the anti-aliasing filter by its behaviour rather than
// its coefficients: a constant input and tones at 1 kHz and 9 kHz (in the
// passband) must keep their amplitude within 0.4 dB, tones at 11.5 kHz must
// be attenuated (the cutoff) and tones at 14 kHz, 16 kHz and 24 kHz (which would
// alias after decimation) by more than 55 dB. Sample interval 64 clocks;
// latency must be 56 clocks.
module tb_aa_filter;
  import aurras_pkg::*;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  sample_t in_sample = '0, out_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  aa_filter dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Run a tone of `freq` Hz at 48 kHz sampling, return the peak output after
  // the filter has settled.
  task automatic tone(input real freq, input real amp, output int peak);
    int lat;
    peak = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_sample = sample_t'($rtoi(amp * $cos(2.0 * 3.14159265358979 * freq * n / 48000.0)));
      in_valid  = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      if (n == 10) check(lat == 56, $sformatf("latency %0d", lat));
      if (n >= 100) begin
        if (out_sample > peak) peak = out_sample;
        if (-out_sample > peak) peak = -out_sample;
      end
      repeat (4) @(negedge clk);
    end
  endtask

  initial begin
    int peak;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    tone(0.0, 10000.0, peak);
    check(peak >= 9550 && peak <= 10470, $sformatf("DC gain: %0d", peak));
    tone(1000.0, 10000.0, peak);
    check(peak >= 9550 && peak <= 10470, $sformatf("1 kHz passband: %0d", peak));
    tone(9000.0, 10000.0, peak);
    check(peak >= 9000 && peak <= 10470, $sformatf("9 kHz passband: %0d", peak));
    tone(11500.0, 10000.0, peak);
    check(peak < 7080, $sformatf("11.5 kHz cutoff: %0d", peak));
    tone(14000.0, 10000.0, peak);
    check(peak < 18, $sformatf("14 kHz stopband: %0d", peak));
    tone(16000.0, 10000.0, peak);
    check(peak < 18, $sformatf("16 kHz stopband: %0d", peak));
    tone(24000.0, 10000.0, peak);
    check(peak < 18, $sformatf("24 kHz stopband: %0d", peak));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
