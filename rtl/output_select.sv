// output_select: chooses what the system speaker plays and forms the
// anti-noise by negation.
//
// Sources, all signed 16-bit samples held between updates:
//   anti_src   the (mode-selected, phase-corrected, delayed) noise estimate;
//              played negated, so it interferes destructively
//   in_mic     input microphone after preprocessing (pass-through)
//   cal_mic    calibration microphone after preprocessing (pass-through)
//   tone       test tone
//   monitor    input audio delayed by one second (monitoring output)
// Switch assignment, highest priority first: sw[5] tone, sw[4] calibration
// microphone, sw[3] input microphone, sw[6] one-second monitor; with none of
// them set the output is the anti-noise. (sw[2] selects the cancellation
// mode and is used before this block.) Negation saturates, so -32768 becomes
// +32767. The output is registered: one clock of latency.
//
// The design lists these outputs and says switches SW2-SW8 choose between
// them but does not give the assignment; the mapping above is this
// implementation's own.
module output_select
  import aurras_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [8:3] sw,
  input  sample_t    anti_src,
  input  sample_t    in_mic,
  input  sample_t    cal_mic,
  input  sample_t    tone,
  input  sample_t    monitor,
  output sample_t    out_sample
);
  typedef enum logic [2:0] {SRC_ANTI, SRC_IN, SRC_CAL, SRC_TONE, SRC_MON} src_e;
  src_e src;

  always_comb begin
    if      (sw[5]) src = SRC_TONE;
    else if (sw[4]) src = SRC_CAL;
    else if (sw[3]) src = SRC_IN;
    else if (sw[6]) src = SRC_MON;
    else            src = SRC_ANTI;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_sample <= '0;
    end else begin
      unique case (src)
        SRC_TONE: out_sample <= tone;
        SRC_CAL:  out_sample <= cal_mic;
        SRC_IN:   out_sample <= in_mic;
        SRC_MON:  out_sample <= monitor;
        default:  out_sample <= saturate(-48'(anti_src));
      endcase
    end
  end

endmodule
