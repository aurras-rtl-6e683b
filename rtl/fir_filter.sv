// fir_filter: time-multiplexed FIR filter, one multiply-accumulate per clock.
//
//   y[n] = sum_{k=0}^{NTAPS-1} coefs[k] * x[n-k]  >>> COEF_FRAC   (saturated)
//
// Audio samples arrive at most once every 2048 clocks while the filter needs
// NTAPS+1, so a single multiplier walks over the taps one per cycle instead of
// spending NTAPS multipliers. The last NTAPS inputs are held in a shift
// register; `coefs` is an input so the same engine serves a fixed filter (the
// anti-aliasing low-pass) and a reloadable one (speaker phase correction).
//
// Timing: `out_valid` pulses NTAPS+1 clocks after `in_valid`; the next
// `in_valid` must not come before that (checked by an assertion). Coefficients
// are signed 16-bit fractions with COEF_FRAC fractional bits; the product sum
// is kept at full precision and truncated only at the output.
module fir_filter
  import aurras_pkg::*;
#(
  parameter int unsigned NTAPS     = 31,
  parameter int unsigned COEF_FRAC = 15
) (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [15:0] coefs [NTAPS],
  input  sample_t            in_sample,
  input  logic               in_valid,
  output sample_t            out_sample,
  output logic               out_valid,
  output logic               busy
);
  localparam int unsigned IW = (NTAPS > 1) ? $clog2(NTAPS) : 1;

  sample_t            taps [NTAPS];
  logic [IW-1:0]      idx;
  logic signed [47:0] acc;
  logic signed [47:0] acc_next;

  assign acc_next = acc + 48'(taps[idx] * coefs[idx]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) taps[k] <= '0;
      idx        <= '0;
      acc        <= '0;
      busy       <= 1'b0;
      out_sample <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && !busy) begin
        taps[0] <= in_sample;
        for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
        idx  <= '0;
        acc  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc <= acc_next;
        if (idx == IW'(NTAPS - 1)) begin
          busy       <= 1'b0;
          out_sample <= saturate(acc_next >>> COEF_FRAC);
          out_valid  <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (rst) in_valid |-> !busy)
    else $error("fir_filter: new sample while the previous one is still being filtered");

endmodule
