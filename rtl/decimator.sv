// decimator: halves the sample rate (48 kHz to 24 kHz) by keeping every
// other sample.
//
// The input has already been low-pass filtered, so no arithmetic is needed: a
// one-bit phase toggles on each input sample and the samples that arrive with
// the phase at zero are passed on, registered, one clock later. After reset
// the first input sample is kept. Generalised to keep one of every FACTOR
// samples; the design uses FACTOR = 2.
module decimator
  import aurras_pkg::*;
#(
  parameter int unsigned FACTOR = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t in_sample,
  input  logic    in_valid,
  output sample_t out_sample,
  output logic    out_valid
);
  localparam int unsigned CW = (FACTOR > 1) ? $clog2(FACTOR) : 1;
  logic [CW-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= '0;
      out_sample <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= (phase == CW'(FACTOR - 1)) ? '0 : phase + 1'b1;
        if (phase == '0) begin
          out_sample <= in_sample;
          out_valid  <= 1'b1;
        end
      end
    end
  end

endmodule
