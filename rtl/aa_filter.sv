// aa_filter: anti-aliasing low-pass filter ahead of the 2:1 decimator.
//
// A 55-tap linear-phase FIR at 48 kHz whose transition band is centred on
// 11.5 kHz, just under the 12 kHz Nyquist frequency of the 24 kHz output
// rate. The coefficients are a Parks-McClellan (Remez exchange) equiripple
// design: passband 0-10 kHz, stopband 13-24 kHz, stopband weight 10, rounded
// to Q15. After rounding the passband ripple is about +/-0.03 dB (DC gain
// 32677/32768), the response at 11.5 kHz is about -8 dB and the stopband is
// below -65 dB. The filter runs on the shared sequential engine, so
// `out_valid` follows `in_valid` by 56 clocks.
//
// The original design also used an equiripple filter with under 0.4 dB of
// passband ripple and an 11.5 kHz cutoff, built with a vendor FIR generator;
// it did not publish the band edges, length or coefficients, so those are this
// implementation's own.
module aa_filter
  import aurras_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t in_sample,
  input  logic    in_valid,
  output sample_t out_sample,
  output logic    out_valid
);
  localparam int unsigned NTAPS = 55;
  localparam logic signed [15:0] COEFS [NTAPS] = '{
    16'sd13, -16'sd1, -16'sd47, -16'sd47, 16'sd36, 16'sd73, -16'sd43, -16'sd128,
    16'sd30, 16'sd197, 16'sd4, -16'sd282, -16'sd71, 16'sd380, 16'sd184, -16'sd486,
    -16'sd361, 16'sd595, 16'sd629, -16'sd698, -16'sd1044, 16'sd788, 16'sd1748, -16'sd859,
    -16'sd3266, 16'sd903, 16'sd10359, 16'sd15465, 16'sd10359, 16'sd903, -16'sd3266, -16'sd859,
    16'sd1748, 16'sd788, -16'sd1044, -16'sd698, 16'sd629, 16'sd595, -16'sd361, -16'sd486,
    16'sd184, 16'sd380, -16'sd71, -16'sd282, 16'sd4, 16'sd197, 16'sd30, -16'sd128,
    -16'sd43, 16'sd73, 16'sd36, -16'sd47, -16'sd47, -16'sd1, 16'sd13
  };

  logic signed [15:0] coefs [NTAPS];
  logic               busy;

  always_comb coefs = COEFS;

  fir_filter #(.NTAPS(NTAPS), .COEF_FRAC(15)) u_fir (
    .clk, .rst, .coefs, .in_sample, .in_valid, .out_sample, .out_valid, .busy
  );

endmodule
