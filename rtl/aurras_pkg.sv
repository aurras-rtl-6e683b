// aurras_pkg: types and constants shared by the noise-canceller modules.
//
// The system clock is 98.304 MHz (the design note rounds it to 98.3 MHz) and the
// audio path runs on signed 16-bit samples: 48 kHz straight from the
// microphones, 24 kHz after decimation. At 24 kHz one sample period is exactly
// 4096 clock cycles, which is the budget the convolution has to fit into.
// The room impulse response is one second long: 24000 samples, held in four
// banks of 6000 so that eight values can be read per cycle.
package aurras_pkg;

  typedef logic signed [15:0] sample_t;

  localparam int unsigned SAMPLE_W       = 16;
  localparam int unsigned CLK_HZ         = 98_304_000;
  localparam int unsigned AUDIO_HZ       = 24_000;
  localparam int unsigned CYCLES_PER_SMP = CLK_HZ / AUDIO_HZ;  // 4096
  localparam int unsigned IR_LEN_DEF     = 24_000;  // one second at 24 kHz
  localparam int unsigned NUM_BANKS      = 4;

  // Saturate a wide signed value to the 16-bit sample range.
  function automatic sample_t saturate(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endpackage
