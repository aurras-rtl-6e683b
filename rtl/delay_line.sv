// delay_line: delays a sample stream by a run-time number of samples, using a
// dual-port block RAM as a circular buffer.
//
// Each input sample is written at the write pointer, which then advances
// (wrapping at DEPTH). On the next clock the read port is given the address
// `delay` samples behind the sample just written, so the output is
// x[n - delay]; with delay = 0 it is the input itself. `out_valid` follows
// `in_valid` by three clocks (one to form the read address, two for the RAM).
// `delay` may change at any time; it takes effect with the next sample.
// It must be below DEPTH.
//
// In the noise canceller the delay is the speaker's time of flight: 34.5 cm
// at the speed of sound is about 1 ms, 24 samples at 24 kHz, set on six
// switches (SW15-SW10), hence the default DEPTH of 64. A second instance with
// a one-second delay serves as a monitoring output. The circular-buffer
// structure follows the design; the exact pointer timing is this
// implementation's.
module delay_line
  import aurras_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] delay,
  input  sample_t       in_sample,
  input  logic          in_valid,
  output sample_t       out_sample,
  output logic          out_valid
);
  logic [AW-1:0] wp, rd_addr;
  logic [1:0]    pend;
  logic [15:0]   dout_a, dout_b;

  // Address `delay` behind the write pointer, modulo DEPTH.
  function automatic logic [AW-1:0] behind(input logic [AW-1:0] p, input logic [AW-1:0] d);
    return (p >= d) ? p - d : AW'((AW+1)'(p) + (AW+1)'(DEPTH) - (AW+1)'(d));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wp        <= '0;
      rd_addr   <= '0;
      pend      <= '0;
      out_valid <= 1'b0;
    end else begin
      pend      <= {pend[0], in_valid};
      out_valid <= pend[1];
      if (in_valid) begin
        rd_addr <= behind(wp, delay);
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
    end
  end

  bram_dp #(.DEPTH(DEPTH), .WIDTH(SAMPLE_W)) u_mem (
    .clk, .addr_a(wp), .we_a(in_valid && !rst), .din_a(in_sample), .dout_a,
    .addr_b(rd_addr), .dout_b
  );

  assign out_sample = sample_t'(dout_b);

endmodule
