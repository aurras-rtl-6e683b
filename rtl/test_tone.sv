// test_tone: square-wave test tone for checking the output speaker.
//
// On every sample strobe `tick` a counter advances; the output is +AMPLITUDE
// for the first half of each PERIOD-sample cycle and -AMPLITUDE for the
// second. With the defaults (48 samples at 24 kHz) the tone is 500 Hz, the
// frequency at which the canceller works best. The design only names a test
// tone as one of the selectable outputs; waveform, pitch and level are this
// implementation's choice.
module test_tone
  import aurras_pkg::*;
#(
  parameter int unsigned PERIOD    = 48,
  parameter sample_t     AMPLITUDE = 16'sd4096
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    tick,
  output sample_t tone
);
  localparam int unsigned CW = $clog2(PERIOD);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else if (tick) cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
  end

  assign tone = (cnt < CW'(PERIOD / 2)) ? AMPLITUDE : -AMPLITUDE;

endmodule
