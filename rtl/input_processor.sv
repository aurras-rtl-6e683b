// input_processor: turns raw 48 kHz microphone samples into zero-centred
// 24 kHz audio.
//
// Three stages in series, each passing a sample with a valid strobe:
//   dc_blocker  (offset measured on `calibrate`, then subtracted)
//   aa_filter   (55-tap equiripple low-pass, 11.5 kHz cutoff)
//   decimator   (keeps every other filtered sample)
// Latency from `in_valid` to `out_valid` is 1 + 56 + 1 = 58 clocks for the
// samples the decimator keeps. The chain matches the design's preprocessing
// order; one instance serves each microphone.
module input_processor
  import aurras_pkg::*;
#(
  parameter int unsigned AVG_SHIFT = 15
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    calibrate,
  input  sample_t in_sample,
  input  logic    in_valid,
  output sample_t out_sample,
  output logic    out_valid,
  output logic    cal_busy
);
  sample_t dc_sample, aa_sample;
  logic    dc_valid, aa_valid;
  sample_t offset;

  dc_blocker #(.AVG_SHIFT(AVG_SHIFT)) u_dc (
    .clk, .rst, .calibrate, .in_sample, .in_valid,
    .out_sample(dc_sample), .out_valid(dc_valid), .busy(cal_busy), .offset
  );

  aa_filter u_aa (
    .clk, .rst, .in_sample(dc_sample), .in_valid(dc_valid),
    .out_sample(aa_sample), .out_valid(aa_valid)
  );

  decimator #(.FACTOR(2)) u_dec (
    .clk, .rst, .in_sample(aa_sample), .in_valid(aa_valid), .out_sample, .out_valid
  );

endmodule
