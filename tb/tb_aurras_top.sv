// tb_aurras_top: end-to-end test of the noise canceller at reduced sizes
// (bit clock = clk/2, so one 24 kHz sample is 256 clocks; 16-sample DC
// average; 64-tap impulse response; 8-tap phase filter; 100-sample monitor).
//
// Two I2S microphone models feed the design. The input microphone carries a
// -900 baseline plus a test signal; the calibration microphone a -600
// baseline, noise, and an echo of the design's own impulse. The test walks
// through: DC calibration, core-mode cancellation of a constant level
// (checked at the speaker sample, sign inverted), an impulse response
// measurement, room mode, a delay change, loading phase coefficients, and
// every speaker source. Monitors on internal stream strobes check, at every
// sample, each stage against an independent model built from the stage's
// input stream: convolution (direct sum with the recorded IR), phase FIR,
// delay, monitor delay and output selection. Each mechanism is counted and
// must have happened at least once. PDM density is checked at the end.
module tb_aurras_top;
  import aurras_pkg::*;
  localparam int unsigned SCK_DIV = 2, AVG_SHIFT = 4, IR_LEN = 64, MON = 100, PT = 8;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] btn = '0;
  logic [15:0] sw = '0;
  logic in_mic_sck, in_mic_ws, in_mic_sd, cal_mic_sck, cal_mic_ws, cal_mic_sd;
  logic coef_we = 1'b0;
  logic [2:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic spk_pdm, cal_pdm, dc_busy, ir_busy;
  sample_t spk_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aurras_top #(.SCK_DIV(SCK_DIV), .AVG_SHIFT(AVG_SHIFT), .IR_LEN(IR_LEN),
               .MONITOR_DELAY(MON), .PHASE_TAPS(PT)) dut (.*);

  logic signed [17:0] in_word = '0, cal_word = '0, in_cur, cal_cur;
  logic in_fs, cal_fs;
  i2s_mic_model u_in_mic  (.sck(in_mic_sck), .ws(in_mic_ws), .word(in_word), .sd(in_mic_sd),
                           .cur_word(in_cur), .frame_start(in_fs));
  i2s_mic_model u_cal_mic (.sck(cal_mic_sck), .ws(cal_mic_ws), .word(cal_word), .sd(cal_mic_sd),
                           .cur_word(cal_cur), .frame_start(cal_fs));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------- stimulus signals ----------------
  int in_level = 0;        // signal on top of the baseline, 16-bit units
  int in_noise = 0;        // amplitude of random noise added
  always @(posedge in_fs)
    in_word <= 18'((-900 + in_level + ((in_noise > 0) ? int'($urandom_range(2 * in_noise)) - in_noise : 0)) * 4);
  always @(posedge cal_fs)
    cal_word <= 18'((-600 + (int'(dut.impulse) >>> 2) + int'($urandom_range(200)) - 100) * 4);

  // ---------------- mechanism counters ----------------
  int n_dccal = 0, n_irmeas = 0, n_conv = 0, n_core_out = 0, n_room_out = 0, n_wrap = 0;
  int n_src [5] = '{0, 0, 0, 0, 0};
  int n_coef = 0, n_delay_change = 0, n_impulse_clk = 0;

  // ---------------- stream monitors ----------------
  int x [$];        // input processor output, 24 kHz
  int h [IR_LEN];   // IR as written by the recorder
  int h_n = 0;
  int modes [$];    // anti-noise source stream (mode mux output)
  int pcs [$];      // phase-corrected stream
  int c [PT];       // model of the phase coefficients
  logic dc_busy_d = 0, ir_busy_d = 0;
  logic [5:0] last_delay = 6'd24;
  logic [AW_T-1:0] ptr_d = '0;
  localparam int AW_T = $clog2(IR_LEN / 4);

  initial for (int k = 0; k < PT; k++) c[k] = (k == 0) ? 16384 : 0;
  initial for (int k = 0; k < IR_LEN; k++) h[k] = 0;

  // expected output-select result, one clock later
  int exp_spk = 0;
  logic exp_spk_ok = 0;

  always @(posedge clk) if (!rst) begin
    longint acc;
    int e, idx;
    dc_busy_d <= dc_busy;
    ir_busy_d <= ir_busy;
    if (dc_busy_d && !dc_busy) n_dccal++;
    if (ir_busy_d && !ir_busy) n_irmeas++;
    if (dut.impulse != 0) n_impulse_clk++;
    ptr_d <= dut.ptr;
    if (ptr_d != 0 && dut.ptr == 0) n_wrap++;

    if (dut.in_v) x.push_back(int'(dut.in_smp));
    if (dut.ir_we) begin
      h[IR_LEN - 1 - (int'(dut.ir_wbank) * (IR_LEN / 4) + int'(dut.ir_waddr))] = int'(dut.ir_wdata);
      h_n++;
    end

    // convolution against the direct sum with the recorded IR
    if (dut.conv_v) begin
      n_conv++;
      acc = 0;
      for (int m = 0; m < IR_LEN && m < x.size(); m++)
        acc += longint'(x[x.size() - 1 - m]) * longint'(h[m]);
      check(dut.conv_smp == sample_t'(acc >>> 13),
            $sformatf("conv %0d: %0d expected %0d", n_conv, dut.conv_smp, sample_t'(acc >>> 13)));
    end

    // phase correction against an FIR over the mode-mux stream
    if (dut.mode_v) begin
      modes.push_back(int'(dut.mode_smp));
      if (sw[2]) n_room_out++; else n_core_out++;
    end
    if (dut.pc_v) begin
      acc = 0;
      for (int k = 0; k < PT; k++)
        if (modes.size() > k) acc += longint'(modes[modes.size() - 1 - k]) * c[k];
      acc = acc >>> 14;
      e = (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : int'(acc);
      check(dut.pc_smp == sample_t'(e), $sformatf("phase filter %0d expected %0d t=%0t n=%0d", dut.pc_smp, e, $time, modes.size()));
      pcs.push_back(int'(dut.pc_smp));
    end

    // flight-time delay
    if (dut.dly_v) begin
      idx = pcs.size() - 1 - int'(sw[15:10]);
      e = (idx >= 0) ? pcs[idx] : 0;
      check(dut.dly_smp == sample_t'(e), $sformatf("delay out %0d expected %0d t=%0t d=%0d n=%0d", dut.dly_smp, e, $time, sw[15:10], pcs.size()));
    end

    // one-second monitor (MON samples here)
    if (dut.mon_v) begin
      idx = x.size() - 1 - MON;
      e = (idx >= 0) ? x[idx] : 0;
      check(dut.mon_smp == sample_t'(e), "monitor delay");
    end

    // output selection and negation
    if (exp_spk_ok) check(spk_sample == sample_t'(exp_spk), $sformatf("speaker %0d expected %0d", spk_sample, exp_spk));
    exp_spk_ok <= 1'b1;
    if (sw[5])      begin exp_spk <= int'(dut.tone);    n_src[1]++; end
    else if (sw[4]) begin exp_spk <= int'(dut.cal_smp); n_src[2]++; end
    else if (sw[3]) begin exp_spk <= int'(dut.in_smp);  n_src[3]++; end
    else if (sw[6]) begin exp_spk <= int'(dut.mon_smp); n_src[4]++; end
    else begin
      exp_spk <= (dut.dly_smp == 16'sh8000) ? 32767 : -int'(dut.dly_smp);
      n_src[0]++;
    end
  end

  task automatic samples(input int n);   // wait n samples at 24 kHz
    repeat (n) @(posedge dut.in_v);
    @(negedge clk);
  endtask

  task automatic press(input int b);
    @(negedge clk); btn[b] = 1'b1;
    repeat (3) @(negedge clk); btn[b] = 1'b0;
  endtask

  int ones;
  initial begin
    sw = '0;
    sw[15:10] = 6'd24;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    samples(10);

    // DC calibration: baseline -900 must disappear
    press(1);
    wait (!dc_busy);
    samples(30);
    check(x[x.size() - 1] >= -3 && x[x.size() - 1] <= 3, $sformatf("calibrated baseline %0d", x[x.size()-1]));

    // core mode: a constant +1000 must come out of the speaker as -1000
    in_level = 1000;
    samples(60);
    check(x[x.size() - 1] >= 994 && x[x.size() - 1] <= 1006, $sformatf("input level %0d", x[x.size()-1]));
    check(spk_sample >= -1006 && spk_sample <= -994, $sformatf("core anti-noise %0d", spk_sample));

    // impulse response measurement, then room mode with a noisy input
    in_level = 0;
    press(3);
    wait (ir_busy);
    wait (!ir_busy);
    check(h_n == IR_LEN, $sformatf("%0d IR words recorded", h_n));
    in_noise = 3000;
    sw[2] = 1'b1;
    samples(100);

    // change the flight-time delay
    sw[15:10] = 6'd5; n_delay_change++;
    samples(20);

    // load a phase-correction filter between two samples
    @(posedge dut.pc_v);
    repeat (3) @(negedge clk);
    for (int k = 0; k < PT; k++) begin
      c[k] = int'($urandom_range(8000)) - 4000;
      @(negedge clk); coef_we = 1'b1; coef_addr = 3'(k); coef_data = 16'(c[k]); n_coef++;
    end
    @(negedge clk); coef_we = 1'b0;
    samples(30);
    sw[2] = 1'b0;
    samples(30);

    // every other speaker source
    sw[5] = 1'b1; samples(10); sw[5] = 1'b0;
    sw[4] = 1'b1; samples(10); sw[4] = 1'b0;
    sw[3] = 1'b1; samples(10); sw[3] = 1'b0;
    sw[6] = 1'b1; samples(10); sw[6] = 1'b0;

    // PDM density: speaker at a steady test tone level
    sw[5] = 1'b1;
    @(posedge dut.in_v);
    ones = 0;
    for (int i = 0; i < 64 * 2; i++) begin
      repeat (16) @(negedge clk);
      if (spk_pdm) ones++;
    end
    check(ones > 64 - 20 && ones < 128, "PDM density of a positive level above one half");
    sw[5] = 1'b0;

    check(n_dccal >= 1,     "mechanism: DC calibration");
    check(n_irmeas >= 1,    "mechanism: IR measurement");
    check(n_impulse_clk > 0, "mechanism: impulse played");
    check(n_conv > 100,     "mechanism: convolution outputs");
    check(n_core_out > 0,   "mechanism: core mode");
    check(n_room_out > 0,   "mechanism: room mode");
    check(n_wrap > 0,       "mechanism: audio buffer pointer wrap");
    check(n_coef > 0,       "mechanism: phase coefficient load");
    check(n_delay_change > 0, "mechanism: delay change");
    foreach (n_src[i]) check(n_src[i] > 0, $sformatf("mechanism: speaker source %0d", i));
    $display("mechanisms: dccal=%0d irmeas=%0d conv=%0d core=%0d room=%0d wrap=%0d coef=%0d src=%p",
             n_dccal, n_irmeas, n_conv, n_core_out, n_room_out, n_wrap, n_coef, n_src);
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
