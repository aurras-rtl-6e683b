// convolution: real-time convolution of the live audio with the recorded room
// impulse response, one output per 24 kHz sample.
//
//   y[n] = sum_{m=0}^{IR_LEN-1} x[n-m] * h[m]
//
// Both operands sit in four-bank memories (audio_buffer, ir_buffer) that
// deliver eight words per clock. Because the IR is stored reversed, y[n] is a
// plain dot product: for word offset k = 0, 2, 4, ... the audio words at
// positions ptr+1+k, ptr+2+k of each bank (oldest first) meet IR words k, k+1
// of the same bank. Eight multiply-accumulate lanes, one per (bank, port),
// each keep their own running sum, so no cycle has to add eight products.
//
// Sequence after `start` (the audio buffer has just taken the new sample):
//   BANK_DEPTH/2 cycles   issue offsets 0, 2, ..., BANK_DEPTH-2 (3000 cycles)
//   3 cycles later        each read pair arrives and is multiplied and added
//   7 cycles              the eight lane sums are added one after another
//   then                  `out_valid` pulses with bits [OUT_LSB+15:OUT_LSB]
//                         of the total, and `done` (tells the audio buffer to
//                         advance its pointer)
// At the default size `out_valid` comes about 3010 clocks after `start`, inside the 4096
// clocks of one 24 kHz sample period.
//
// From the design: the memory organisation, eight lanes with separate running
// sums, three-cycle read latency, the seven-cycle final summation, and output
// bits 13 to 28. Own choices: a 48-bit accumulator width, reading those bits
// directly without saturation (as the design does), control signal names.
module convolution
  import aurras_pkg::*;
#(
  parameter int unsigned IR_LEN     = IR_LEN_DEF,
  parameter int unsigned OUT_LSB    = 13,
  localparam int unsigned BANK_DEPTH = IR_LEN / NUM_BANKS,
  localparam int unsigned AW         = $clog2(BANK_DEPTH),
  localparam int unsigned LANES      = 2 * NUM_BANKS
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic [AW-1:0] rd_off,            // to both buffers
  input  sample_t       audio_data [LANES],
  input  sample_t       ir_data    [LANES],
  output sample_t       out_sample,
  output logic          out_valid,
  output logic          done,
  output logic          busy
);
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DRAIN, C_SUM} conv_state_e;
  conv_state_e st;

  logic signed [47:0] acc [LANES];
  logic signed [47:0] total;
  logic [1:0]         vld;      // read-issue valid, delayed to data arrival
  logic [2:0]         sum_idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= C_IDLE;
      rd_off     <= '0;
      vld        <= '0;
      sum_idx    <= '0;
      total      <= '0;
      out_sample <= '0;
      out_valid  <= 1'b0;
      done       <= 1'b0;
      for (int l = 0; l < LANES; l++) acc[l] <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      // The offset register changes at edge t-1; the memory captures the
      // address at edge t and has the data on its outputs after edge t+1,
      // so the products are added at edge t+2, three edges after the offset.
      vld <= {vld[0], st == C_RUN};

      if (vld[1]) begin
        for (int l = 0; l < LANES; l++)
          acc[l] <= acc[l] + 48'(audio_data[l] * ir_data[l]);
      end

      unique case (st)
        C_IDLE: if (start) begin
          st     <= C_RUN;
          rd_off <= '0;
          for (int l = 0; l < LANES; l++) acc[l] <= '0;
        end
        C_RUN: begin
          if (rd_off == AW'(BANK_DEPTH - 2)) st <= C_DRAIN;
          else                               rd_off <= rd_off + AW'(2);
        end
        C_DRAIN: if (vld == 2'b10) begin    // last products being added now
          st      <= C_SUM;
          sum_idx <= 3'd1;
        end
        C_SUM: begin
          total   <= (sum_idx == 3'd1) ? acc[0] + acc[1] : total + acc[sum_idx];
          sum_idx <= sum_idx + 3'd1;
          if (sum_idx == 3'd7) st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase

      // Output one cycle after the seventh addition.
      if (st == C_SUM && sum_idx == 3'd7) begin
        out_valid  <= 1'b1;
        done       <= 1'b1;
        out_sample <= sample_t'((total + acc[7]) >>> OUT_LSB);
      end
    end
  end

  assign busy = (st != C_IDLE);

  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> st == C_IDLE)
    else $error("convolution: start while busy");

endmodule
