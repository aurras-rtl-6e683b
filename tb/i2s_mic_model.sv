// i2s_mic_model: behavioural model of an I2S MEMS microphone with its
// select pin tied low (left channel), for simulation only.
//
// At the SCK falling edge on which WS goes low the model latches `word`
// (18-bit two's complement) into `cur_word` and pulses `frame_start`; on the
// next 18 falling edges it drives the word MSB first on `sd`. Outside those
// bit slots `sd` is 0 (the real part leaves the line to a pull-down).
module i2s_mic_model (
  input  logic              sck,
  input  logic              ws,
  input  logic signed [17:0] word,
  output logic              sd,
  output logic signed [17:0] cur_word,
  output logic              frame_start
);
  logic       ws_prev = 1'b0;
  int         slot = 99;

  initial begin
    sd          = 1'b0;
    cur_word    = '0;
    frame_start = 1'b0;
  end

  always @(negedge sck) begin
    frame_start <= 1'b0;
    if (!ws && ws_prev) begin
      slot = 0;
      cur_word    <= word;
      frame_start <= 1'b1;
      sd <= 1'b0;
    end else begin
      slot = slot + 1;
      if (!ws && slot >= 1 && slot <= 18) sd <= cur_word[18 - slot];
      else                                sd <= 1'b0;
    end
    ws_prev = ws;
  end
endmodule
