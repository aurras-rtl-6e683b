// i2s_receiver: I2S manager for one MEMS microphone.
//
// The module is the I2S master. It divides the system clock by SCK_DIV to make
// the bit clock (98.304 MHz / 32 = 3.072 MHz) and by 64*SCK_DIV to make the word
// select (48 kHz), so one frame is 64 bit slots: 32 for the left channel (WS
// low) and 32 for the right (WS high). Every bit slot begins with a falling
// edge of SCK, so WS changes on the falling edge as I2S requires. The
// microphone's select pin is tied low, so only the left half carries data: the
// 18-bit two's-complement word arrives MSB first in slots 1..18 (standard I2S
// one-bit delay after the WS edge); slots 19..31 are unused. SD is sampled at
// the rising edge of SCK, in the middle of the slot.
//
// The 18-bit word is cut to 16 bits by dropping its two LSBs, and presented on
// `sample` with a one-cycle `valid` pulse right after slot 18 is sampled, once
// per frame (48 kHz at the default divider).
//
// From the design: 64 SCK per frame, 32 per channel, 18 data bits then 14
// unused, 3.072 MHz bit clock, WS changing on the SCK falling edge, 18 to 16
// bit reduction. Own choices: the one-slot I2S delay, truncation as the way to
// reduce to 16 bits, and the position of the valid pulse.
module i2s_receiver
  import aurras_pkg::*;
#(
  parameter int unsigned SCK_DIV = 32   // system clocks per SCK period (even, >= 2)
) (
  input  logic    clk,
  input  logic    rst,
  output logic    sck,     // bit clock to the microphone
  output logic    ws,      // word select to the microphone
  input  logic    sd,      // serial data from the microphone
  output sample_t sample,  // newest left-channel sample, 16 bits
  output logic    valid    // one-cycle pulse per new sample
);
  localparam int unsigned HALF  = SCK_DIV / 2;
  localparam int unsigned DIV_W = (SCK_DIV > 2) ? $clog2(SCK_DIV) : 1;

  logic [DIV_W-1:0] phase;     // position inside the current bit slot
  logic [5:0]       slot;      // bit slot inside the frame, 0..63
  logic [17:0]      shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      slot  <= '0;
    end else if (phase == DIV_W'(SCK_DIV - 1)) begin
      phase <= '0;
      slot  <= slot + 6'd1;
    end else begin
      phase <= phase + 1'b1;
    end
  end

  // SCK low in the first half of a slot, high in the second half.
  always_ff @(posedge clk) begin
    if (rst) begin
      sck <= 1'b0;
      ws  <= 1'b0;
    end else begin
      sck <= (phase >= DIV_W'(HALF - 1)) && (phase != DIV_W'(SCK_DIV - 1));
      ws  <= (phase == DIV_W'(SCK_DIV - 1)) ? (slot + 6'd1 >= 6'd32) : ws;
    end
  end

  // The registered SCK rises one cycle after phase HALF-1, so SD is taken then.
  wire sample_now = (phase == DIV_W'(HALF)) && (slot >= 6'd1) && (slot <= 6'd18);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg  <= '0;
      sample <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (sample_now) begin
        shreg <= {shreg[16:0], sd};
        if (slot == 6'd18) begin
          sample <= sample_t'({shreg[16:0], sd} >> 2);
          valid  <= 1'b1;
        end
      end
    end
  end

endmodule
