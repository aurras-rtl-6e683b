// ir_buffer: the room impulse response, stored so eight taps can be read per
// clock.
//
// The IR of IR_LEN samples lives in NUM_BANKS = 4 dual-port banks of
// BANK_DEPTH = IR_LEN/4 words. It is stored time-reversed: the recorder writes
// IR sample j at reversed position r = IR_LEN-1-j, i.e. bank r / BANK_DEPTH,
// word r % BANK_DEPTH. Bank 0 therefore holds the last quarter of the IR, last
// sample first, and the convolution can walk every bank with the same rising
// address as it walks the audio buffer.
//
// Write: `wr_en` with a bank number, word address and data (port A).
// Read: `rd_addr` (an even word address) reads words rd_addr (port A) and
// rd_addr+1 (port B) of every bank; `rd_data[2*b]` and `rd_data[2*b+1]` are
// those words of bank b, two clocks later. A write takes port A from the read
// in that cycle.
module ir_buffer
  import aurras_pkg::*;
#(
  parameter int unsigned IR_LEN     = IR_LEN_DEF,
  localparam int unsigned BANK_DEPTH = IR_LEN / NUM_BANKS,
  localparam int unsigned AW         = $clog2(BANK_DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [1:0]    wr_bank,
  input  logic [AW-1:0] wr_addr,
  input  sample_t       wr_data,
  input  logic [AW-1:0] rd_addr,
  output sample_t       rd_data [2*NUM_BANKS]
);
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic          we;
    logic [AW-1:0] addr_a;
    logic [15:0]   dout_a, dout_b;

    assign we     = wr_en && (wr_bank == 2'(b));
    assign addr_a = wr_en ? wr_addr : rd_addr;

    bram_dp #(.DEPTH(BANK_DEPTH), .WIDTH(SAMPLE_W)) u_bank (
      .clk, .addr_a, .we_a(we), .din_a(wr_data), .dout_a,
      .addr_b(rd_addr + AW'(1)), .dout_b
    );

    assign rd_data[2*b]   = sample_t'(dout_a);
    assign rd_data[2*b+1] = sample_t'(dout_b);
  end

endmodule
