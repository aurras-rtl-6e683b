// aurras_top: active noise canceller for an open room.
//
// An input microphone hears the noise on its way to the listener; a speaker
// between the two plays the negated noise, timed to arrive together with the
// noise itself. Two paths produce the anti-noise, selected by sw[2]:
//   core mode   the preprocessed input, unchanged
//   room mode   the input convolved with the room's measured one-second
//               impulse response (24000 taps, one output per 24 kHz sample)
// Either is then phase-corrected for the speaker, delayed by the speaker's
// time of flight (sw[15:10], 24 samples nominal) and negated.
//
// Datapath (clk = 98.304 MHz, audio 16-bit signed):
//   input mic  -> i2s_receiver -> input_processor (DC removal, 11.5 kHz
//                 low-pass, 48->24 kHz) -> audio_buffer / convolution
//   cal. mic   -> i2s_receiver -> input_processor -> ir_recorder -> ir_buffer
//   anti-noise -> phase_correction -> delay_line -> output_select -> PDM
//   ir_recorder impulse                                         -> PDM (cal.)
// A second delay_line keeps the input one second back as a monitor output.
//
// Controls: btn[1] measures both microphones' DC offsets, btn[3] measures the
// impulse response, sw[3..6] pick a pass-through, tone or monitor output
// instead of the anti-noise (see output_select), sw[7], sw[8] are unused.
// The phase-correction coefficients are loaded through the coef_* port.
// The buttons are expected to be debounced and synchronised to clk.
//
// Default parameters are the design's sizes; SCK_DIV, AVG_SHIFT and IR_LEN
// can be reduced for fast simulation (IR_LEN/8 must stay an integer and the
// convolution, about IR_LEN/8 + 11 clocks, must fit in 64*2*SCK_DIV clocks).
module aurras_top
  import aurras_pkg::*;
#(
  parameter int unsigned SCK_DIV       = 32,
  parameter int unsigned AVG_SHIFT     = 15,
  parameter int unsigned IR_LEN        = IR_LEN_DEF,
  parameter int unsigned DELAY_DEPTH   = 64,
  parameter int unsigned MONITOR_DELAY = 24000,
  parameter int unsigned PHASE_TAPS    = 32,
  parameter int unsigned PDM_DIV       = 16,
  parameter int unsigned TONE_PERIOD   = 48,
  localparam int unsigned CAW          = $clog2(PHASE_TAPS)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [3:0]         btn,
  input  logic [15:0]        sw,
  // input microphone (I2S)
  output logic               in_mic_sck,
  output logic               in_mic_ws,
  input  logic               in_mic_sd,
  // calibration microphone (I2S)
  output logic               cal_mic_sck,
  output logic               cal_mic_ws,
  input  logic               cal_mic_sd,
  // phase-correction coefficient load
  input  logic               coef_we,
  input  logic [CAW-1:0]     coef_addr,
  input  logic signed [15:0] coef_data,
  // amplifier: system speaker and calibration speaker channels
  output logic               spk_pdm,
  output logic               cal_pdm,
  output sample_t            spk_sample,
  // status
  output logic               dc_busy,
  output logic               ir_busy
);
  localparam int unsigned BANK_DEPTH = IR_LEN / NUM_BANKS;
  localparam int unsigned AW         = $clog2(BANK_DEPTH);
  localparam int unsigned MON_DEPTH  = MONITOR_DELAY + 1;

  // ---------------- microphone front ends ----------------
  sample_t in_raw, cal_raw, in_smp, cal_smp;
  logic    in_raw_v, cal_raw_v, in_v, cal_v;
  logic    in_dc_busy, cal_dc_busy;

  i2s_receiver #(.SCK_DIV(SCK_DIV)) u_in_i2s (
    .clk, .rst, .sck(in_mic_sck), .ws(in_mic_ws), .sd(in_mic_sd),
    .sample(in_raw), .valid(in_raw_v)
  );
  i2s_receiver #(.SCK_DIV(SCK_DIV)) u_cal_i2s (
    .clk, .rst, .sck(cal_mic_sck), .ws(cal_mic_ws), .sd(cal_mic_sd),
    .sample(cal_raw), .valid(cal_raw_v)
  );

  input_processor #(.AVG_SHIFT(AVG_SHIFT)) u_in_proc (
    .clk, .rst, .calibrate(btn[1]), .in_sample(in_raw), .in_valid(in_raw_v),
    .out_sample(in_smp), .out_valid(in_v), .cal_busy(in_dc_busy)
  );
  input_processor #(.AVG_SHIFT(AVG_SHIFT)) u_cal_proc (
    .clk, .rst, .calibrate(btn[1]), .in_sample(cal_raw), .in_valid(cal_raw_v),
    .out_sample(cal_smp), .out_valid(cal_v), .cal_busy(cal_dc_busy)
  );
  assign dc_busy = in_dc_busy | cal_dc_busy;

  // ---------------- impulse response measurement ----------------
  sample_t       impulse;
  logic          ir_we;
  logic [1:0]    ir_wbank;
  logic [AW-1:0] ir_waddr;
  sample_t       ir_wdata;
  logic          ir_done;

  ir_recorder #(.IR_LEN(IR_LEN), .DELAY_W(6)) u_rec (
    .clk, .rst, .start(btn[3]), .delay(sw[15:10]),
    .in_sample(cal_smp), .in_valid(cal_v), .impulse,
    .wr_en(ir_we), .wr_bank(ir_wbank), .wr_addr(ir_waddr), .wr_data(ir_wdata),
    .busy(ir_busy), .done(ir_done)
  );

  // ---------------- real-time convolution ----------------
  logic [AW-1:0] rd_off;
  sample_t       audio_words [2*NUM_BANKS];
  sample_t       ir_words    [2*NUM_BANKS];
  logic          upd_done, conv_done, conv_v, conv_busy;
  logic [AW-1:0] ptr;
  sample_t       conv_smp;

  ir_buffer #(.IR_LEN(IR_LEN)) u_irbuf (
    .clk, .wr_en(ir_we), .wr_bank(ir_wbank), .wr_addr(ir_waddr), .wr_data(ir_wdata),
    .rd_addr(rd_off), .rd_data(ir_words)
  );

  audio_buffer #(.IR_LEN(IR_LEN)) u_abuf (
    .clk, .rst, .in_sample(in_smp), .in_valid(in_v), .upd_done,
    .rd_off, .rd_data(audio_words), .advance(conv_done), .ptr
  );

  convolution #(.IR_LEN(IR_LEN)) u_conv (
    .clk, .rst, .start(upd_done), .rd_off,
    .audio_data(audio_words), .ir_data(ir_words),
    .out_sample(conv_smp), .out_valid(conv_v), .done(conv_done), .busy(conv_busy)
  );

  // ---------------- anti-noise path ----------------
  logic    room_mode;
  sample_t mode_smp, pc_smp, dly_smp, mon_smp, tone;
  logic    mode_v, pc_v, dly_v, mon_v;

  assign room_mode = sw[2];
  assign mode_smp  = room_mode ? conv_smp : in_smp;
  assign mode_v    = room_mode ? conv_v   : in_v;

  phase_correction #(.NTAPS(PHASE_TAPS)) u_phase (
    .clk, .rst, .coef_we, .coef_addr, .coef_data,
    .in_sample(mode_smp), .in_valid(mode_v), .out_sample(pc_smp), .out_valid(pc_v)
  );

  delay_line #(.DEPTH(DELAY_DEPTH)) u_delay (
    .clk, .rst, .delay($clog2(DELAY_DEPTH)'(sw[15:10])),
    .in_sample(pc_smp), .in_valid(pc_v), .out_sample(dly_smp), .out_valid(dly_v)
  );

  delay_line #(.DEPTH(MON_DEPTH)) u_monitor (
    .clk, .rst, .delay($clog2(MON_DEPTH)'(MONITOR_DELAY)),
    .in_sample(in_smp), .in_valid(in_v), .out_sample(mon_smp), .out_valid(mon_v)
  );

  test_tone #(.PERIOD(TONE_PERIOD)) u_tone (
    .clk, .rst, .tick(in_v), .tone
  );

  output_select u_sel (
    .clk, .rst, .sw(sw[8:3]), .anti_src(dly_smp), .in_mic(in_smp), .cal_mic(cal_smp),
    .tone, .monitor(mon_smp), .out_sample(spk_sample)
  );

  // ---------------- speaker outputs ----------------
  pdm_modulator #(.CE_DIV(PDM_DIV)) u_spk_pdm (
    .clk, .rst, .in_sample(spk_sample), .pdm(spk_pdm)
  );
  pdm_modulator #(.CE_DIV(PDM_DIV)) u_cal_pdm (
    .clk, .rst, .in_sample(impulse), .pdm(cal_pdm)
  );

endmodule
