// tb_aurras_full: one complete operation of the noise canceller with every
// parameter at its default (3.072 MHz I2S, 2**15-sample DC average, one-second
// 24000-tap impulse response, 24-sample flight delay).
//
// Sequence: DC calibration of both microphones (0.68 s of audio), a constant
// level in core mode that must reach the speaker negated, a full one-second
// impulse-response measurement (24000 words), then room mode with a noisy
// input. Every convolution output is compared with the direct 24000-term sum
// over the recorded IR, and must be ready within one 4096-clock sample period;
// the delayed anti-noise and the speaker sample are checked at every sample.
// About 180 million clocks.
module tb_aurras_full;
  import aurras_pkg::*;
  localparam int unsigned IR_N = IR_LEN_DEF;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] btn = '0;
  logic [15:0] sw = '0;
  logic in_mic_sck, in_mic_ws, in_mic_sd, cal_mic_sck, cal_mic_ws, cal_mic_sd;
  logic coef_we = 1'b0;
  logic [4:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic spk_pdm, cal_pdm, dc_busy, ir_busy;
  sample_t spk_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aurras_top dut (.*);

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

  int in_level = 0, in_noise = 0;
  always @(posedge in_fs)
    in_word <= 18'((-900 + in_level + ((in_noise > 0) ? int'($urandom_range(2 * in_noise)) - in_noise : 0)) * 4);
  always @(posedge cal_fs)
    cal_word <= 18'((-600 + (int'(dut.impulse) >>> 2) + int'($urandom_range(200)) - 100) * 4);

  int x [$];
  int h [IR_N];
  int h_n = 0, n_conv = 0, n_room = 0;
  int pcs [$];
  int conv_start = 0, cyc = 0;
  int exp_spk = 0;
  logic exp_spk_ok = 1'b0;

  initial for (int k = 0; k < IR_N; k++) h[k] = 0;

  always @(posedge clk) if (!rst) begin
    longint acc;
    int e, idx;
    cyc++;
    if (dut.in_v) begin
      x.push_back(int'(dut.in_smp));
      if (x.size() > IR_N + 100) void'(x.pop_front());
    end
    if (dut.upd_done) conv_start = cyc;
    if (dut.ir_we) begin
      h[IR_N - 1 - (int'(dut.ir_wbank) * (IR_N / 4) + int'(dut.ir_waddr))] = int'(dut.ir_wdata);
      h_n++;
    end
    if (dut.conv_v && sw[2]) begin
      n_conv++;
      acc = 0;
      for (int m = 0; m < IR_N && m < x.size(); m++)
        acc += longint'(x[x.size() - 1 - m]) * longint'(h[m]);
      check(dut.conv_smp == sample_t'(acc >>> 13),
            $sformatf("conv %0d: %0d expected %0d", n_conv, dut.conv_smp, sample_t'(acc >>> 13)));
      check(cyc - conv_start < int'(CYCLES_PER_SMP), $sformatf("convolution took %0d clocks", cyc - conv_start));
    end
    if (dut.pc_v) pcs.push_back(int'(dut.pc_smp));   // phase filter at reset: identity
    if (dut.mode_v && sw[2]) n_room++;
    if (dut.dly_v) begin
      idx = pcs.size() - 1 - int'(sw[15:10]);
      e = (idx >= 0) ? pcs[idx] : 0;
      check(dut.dly_smp == sample_t'(e), "flight-time delay");
    end
    if (exp_spk_ok) check(spk_sample == sample_t'(exp_spk), "speaker sample is the negated anti-noise");
    exp_spk_ok <= 1'b1;
    exp_spk <= (dut.dly_smp == 16'sh8000) ? 32767 : -int'(dut.dly_smp);
  end

  task automatic samples(input int n);
    repeat (n) @(posedge dut.in_v);
    @(negedge clk);
  endtask

  task automatic press(input int b);
    @(negedge clk); btn[b] = 1'b1;
    repeat (3) @(negedge clk); btn[b] = 1'b0;
  endtask

  initial begin
    sw[15:10] = 6'd24;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    samples(10);
    press(1);
    check(dc_busy, "DC calibration running");
    wait (!dc_busy);
    samples(30);
    check(x[x.size() - 1] >= -3 && x[x.size() - 1] <= 3, $sformatf("calibrated baseline %0d", x[x.size()-1]));
    in_level = 1000;
    samples(60);
    check(spk_sample >= -1006 && spk_sample <= -994, $sformatf("core anti-noise %0d", spk_sample));
    in_level = 0;
    in_noise = 3000;
    press(3);
    wait (ir_busy);
    wait (!ir_busy);
    check(h_n == IR_N, $sformatf("%0d IR words recorded", h_n));
    sw[2] = 1'b1;
    samples(40);
    check(n_conv >= 30 && n_room >= 30, $sformatf("%0d room-mode outputs checked", n_conv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
