// tb_tone_workload: the sine-tone measurement set (50 Hz to 3500 Hz) played
// through the complete design in core mode, all parameters at their
// defaults. For each tone the input microphone model sends a 48 kHz sine of
// amplitude 8000 (16-bit units, no DC offset); after the filters have
// settled, the test checks that
//   - the preprocessed input keeps the tone's amplitude within 0.4 dB
//     (anti-aliasing passband),
//   - every speaker sample is the negated input delayed by exactly 24
//     samples (the flight time, SW15-SW10 = 24), and
//   - the speaker amplitude matches the input amplitude within 0.4 dB.
// Acoustic attenuation cannot be simulated; this shows the digital path
// delivers a correctly timed, inverted copy at every measured frequency.
module tb_tone_workload;
  import aurras_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] btn = '0;
  logic [15:0] sw = '0;
  logic in_mic_sck, in_mic_ws, in_mic_sd, cal_mic_sck, cal_mic_ws, cal_mic_sd;
  logic spk_pdm, cal_pdm, dc_busy, ir_busy;
  sample_t spk_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aurras_top dut (.clk, .rst, .btn, .sw, .in_mic_sck, .in_mic_ws, .in_mic_sd,
                  .cal_mic_sck, .cal_mic_ws, .cal_mic_sd, .coef_we(1'b0), .coef_addr('0),
                  .coef_data('0), .spk_pdm, .cal_pdm, .spk_sample, .dc_busy, .ir_busy);

  logic signed [17:0] in_word = '0, in_cur, cal_cur;
  logic in_fs, cal_fs;
  i2s_mic_model u_in_mic  (.sck(in_mic_sck), .ws(in_mic_ws), .word(in_word), .sd(in_mic_sd),
                           .cur_word(in_cur), .frame_start(in_fs));
  i2s_mic_model u_cal_mic (.sck(cal_mic_sck), .ws(cal_mic_ws), .word(18'sd0), .sd(cal_mic_sd),
                           .cur_word(cal_cur), .frame_start(cal_fs));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  real freq = 50.0;
  int  n48 = 0;
  always @(posedge in_fs) begin
    in_word <= 18'($rtoi(8000.0 * $sin(2.0 * 3.14159265358979 * freq * n48 / 48000.0)) * 4);
    n48++;
  end

  int x [$];
  always @(posedge clk) if (!rst) begin
    if (dut.in_v) begin
      x.push_back(int'(dut.in_smp));
      if (x.size() > 4000) void'(x.pop_front());
    end
  end

  int freqs [15] = '{50, 100, 200, 300, 400, 500, 600, 700, 800, 900, 1000, 1500, 2000, 2500, 3500};

  // amplitude of a tone of known frequency from 480 samples (a whole number of
  // periods for every tone here): correlate with sine and cosine
  function automatic real amp(input int v [$], input real f);
    real si = 0.0, co = 0.0, ph;
    for (int k = 0; k < v.size(); k++) begin
      ph = 2.0 * 3.14159265358979 * f * k / 24000.0;
      si += v[k] * $sin(ph);
      co += v[k] * $cos(ph);
    end
    return 2.0 * $sqrt(si * si + co * co) / v.size();
  endfunction

  initial begin
    int e, settle;
    int vin [$], vout [$];
    real pk_in, pk_out;
    sw[15:10] = 6'd24;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    foreach (freqs[i]) begin
      freq = real'(freqs[i]);
      // settle: 100 samples plus one full period
      settle = 100 + 24000 / freqs[i];
      repeat (settle) @(posedge dut.in_v);
      vin.delete(); vout.delete();
      repeat (480) begin
        @(posedge dut.in_v);
        @(negedge clk);
        vin.push_back(x[x.size() - 1]);
        // wait for this sample's anti-noise to reach the speaker
        @(posedge dut.dly_v);
        repeat (2) @(negedge clk);
        e = -x[x.size() - 1 - 24];
        check(spk_sample == sample_t'(e), $sformatf("%0d Hz: speaker %0d expected %0d", freqs[i], spk_sample, e));
        vout.push_back(int'(spk_sample));
      end
      pk_in = amp(vin, freq);
      pk_out = amp(vout, freq);
      check(pk_in >= 7640.0 && pk_in <= 8380.0, $sformatf("%0d Hz: input amplitude %f", freqs[i], pk_in));
      check(pk_out >= 7640.0 && pk_out <= 8380.0, $sformatf("%0d Hz: speaker amplitude %f", freqs[i], pk_out));
      $display("%0d Hz: input amplitude %0.1f, anti-noise amplitude %0.1f", freqs[i], pk_in, pk_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
