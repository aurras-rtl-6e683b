// dc_blocker: removes the microphone's fixed DC offset.
//
// The MEMS microphones sit at a steady baseline (about -900 counts), so the
// offset is measured once rather than tracked. A rising edge on `calibrate`
// (button BTN1) starts a measurement: the next 2**AVG_SHIFT input samples
// (2**15 = 0.68 s at 48 kHz) are added into a running sum, and the sum shifted
// right by AVG_SHIFT becomes the new offset. Every sample, before, during and
// after a measurement, leaves as `in - offset`, saturated to 16 bits, one
// clock after it arrives (`out_valid` follows `in_valid` by one cycle).
// `busy` is high while a measurement runs.
//
// From the design: averaging 2**15 samples by a running sum and a 15-bit right
// shift, subtracting the result, BTN1 as the trigger. Own choices: edge
// triggering, zero offset after reset, saturation of the difference, the
// arithmetic (sign-keeping) shift.
module dc_blocker
  import aurras_pkg::*;
#(
  parameter int unsigned AVG_SHIFT = 15   // log2 of the number of samples averaged
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    calibrate,
  input  sample_t in_sample,
  input  logic    in_valid,
  output sample_t out_sample,
  output logic    out_valid,
  output logic    busy,
  output sample_t offset
);
  localparam int unsigned SUM_W = SAMPLE_W + AVG_SHIFT;

  logic                    cal_d;
  logic signed [SUM_W-1:0] sum;
  logic [AVG_SHIFT:0]      count;
  logic signed [SUM_W-1:0] sum_next;

  assign sum_next = sum + SUM_W'(in_sample);

  always_ff @(posedge clk) begin
    if (rst) begin
      cal_d  <= 1'b0;
      busy   <= 1'b0;
      sum    <= '0;
      count  <= '0;
      offset <= '0;
    end else begin
      cal_d <= calibrate;
      if (calibrate && !cal_d && !busy) begin
        busy  <= 1'b1;
        sum   <= '0;
        count <= '0;
      end else if (busy && in_valid) begin
        sum   <= sum_next;
        count <= count + 1'b1;
        if (count == (AVG_SHIFT+1)'((1 << AVG_SHIFT) - 1)) begin
          busy   <= 1'b0;
          offset <= sample_t'(sum_next >>> AVG_SHIFT);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_sample <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        out_sample <= saturate(48'(in_sample) - 48'(offset));
    end
  end

endmodule
