// pdm_modulator: first-order delta-sigma modulator driving one speaker
// channel of the digital amplifier with a one-bit pulse-density stream.
//
// Every CE_DIV system clocks (98.304 MHz / 16 = 6.144 MHz) the signed input
// plus a constant OFFSET is mapped to an unsigned 16-bit level u (saturated)
// and added to a 16-bit error accumulator; the carry out of that addition is
// the output bit. The density of ones is therefore u / 65536, i.e. 50 % for
// a zero sample. The offset keeps the stream away from the pattern that a
// near-zero DC level produces, which was heard as chirping.
//
// From the design: first order, about 6 MHz, a constant output offset. Own
// choices: the exact rate (1/16 of the clock) and OFFSET = 1024.
module pdm_modulator
  import aurras_pkg::*;
#(
  parameter int unsigned CE_DIV = 16,
  parameter int          OFFSET = 1024
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t in_sample,
  output logic    pdm
);
  localparam int unsigned CW = (CE_DIV > 1) ? $clog2(CE_DIV) : 1;

  logic [CW-1:0]      div;
  logic [15:0]        err;
  logic [16:0]        sum;
  logic signed [17:0] lvl;
  logic [15:0]        u;

  assign lvl = 18'(in_sample) + 18'sd32768 + 18'(OFFSET);
  assign u   = (lvl > 18'sd65535) ? 16'hffff : (lvl < 0) ? 16'h0000 : lvl[15:0];
  assign sum = {1'b0, err} + {1'b0, u};

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0;
      err <= '0;
      pdm <= 1'b0;
    end else begin
      div <= (div == CW'(CE_DIV - 1)) ? '0 : div + 1'b1;
      if (div == '0) begin
        err <= sum[15:0];
        pdm <= sum[16];
      end
    end
  end

endmodule
