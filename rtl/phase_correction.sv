// phase_correction: all-pass FIR that pre-distorts the anti-noise signal
// with the inverse of the output speaker's phase response.
//
// An NTAPS-tap FIR (the shared sequential engine, one multiply per clock)
// whose coefficients sit in a register file that can be rewritten at run time
// through `coef_we`/`coef_addr`/`coef_data`. Coefficients are signed 16-bit
// with 14 fractional bits (range -2 to +2). After reset the filter is the
// identity (coefficient 0 = 1.0, all others 0), so the path is usable before
// a coefficient set is loaded. `out_valid` follows `in_valid` by NTAPS+1
// clocks.
//
// The design obtains its coefficients offline by a weighted least-squares fit
// of both the inverse speaker phase and zero group delay, weighted six times
// in 200-2000 Hz. Neither the resulting coefficients nor the filter length are
// given, so both the length (32) and the load port are this implementation's
// choices; the coefficient set has to be supplied by the user.
module phase_correction
  import aurras_pkg::*;
#(
  parameter int unsigned NTAPS = 32,
  localparam int unsigned CAW  = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               coef_we,
  input  logic [CAW-1:0]     coef_addr,
  input  logic signed [15:0] coef_data,
  input  sample_t            in_sample,
  input  logic               in_valid,
  output sample_t            out_sample,
  output logic               out_valid
);
  logic signed [15:0] coefs [NTAPS];
  logic               busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) coefs[k] <= (k == 0) ? 16'sd16384 : 16'sd0;
    end else if (coef_we) begin
      coefs[coef_addr] <= coef_data;
    end
  end

  fir_filter #(.NTAPS(NTAPS), .COEF_FRAC(14)) u_fir (
    .clk, .rst, .coefs, .in_sample, .in_valid, .out_sample, .out_valid, .busy
  );

endmodule
