// bram_dp: one dual-port block RAM bank, written the way FPGA tools infer
// block RAM.
//
// Port A reads and writes, port B only reads; both have their own address, so
// two different words can be read in the same cycle. Reads take two clocks
// (address register inside the RAM, then an output register): data for an
// address presented at edge t is on `dout_*` after edge t+2. A write on port A
// returns the old contents on `dout_a` (read-first). The contents start at zero,
// as FPGA block RAM does after configuration.
//
// The design specifies dual-port block RAM for the delay buffer, the IR buffer
// and the audio buffer; depth and width are set by the instantiating module.
module bram_dp #(
  parameter int unsigned DEPTH = 6000,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] dout_a,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] dout_b
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] q_a, q_b;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    q_a <= mem[addr_a];
    if (we_a) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk) begin
    q_b <= mem[addr_b];
  end

  always_ff @(posedge clk) begin
    dout_a <= q_a;
    dout_b <= q_b;
  end

endmodule
