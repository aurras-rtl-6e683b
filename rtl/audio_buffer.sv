// audio_buffer: the last IR_LEN input samples, in four cascading circular
// banks, readable eight at a time.
//
// Bank 3 holds the newest quarter of the history and bank 0 the oldest. All
// four banks share one pointer `ptr`: in every bank the word at `ptr` is that
// bank's newest sample and the word at ptr+1 (wrapping) its oldest. Instead of
// shifting 24000 words when a sample arrives, only the column at `ptr` moves:
//   cycle 0     read word ptr of banks 3, 2 and 1 (port A)
//   cycle 2     write the new sample to bank 3, and the old words of banks
//               3, 2, 1 to banks 2, 1, 0 at the same address; the old word of
//               bank 0, the oldest sample overall, is dropped
//   cycle 3     `upd_done` pulses
// That is three reads and four writes per sample. After the convolution has
// used the buffer, `advance` moves `ptr` on by one so the next sample lands on
// what is now the oldest word of bank 3.
//
// Read side for the convolution: `rd_off` = k (even) reads, in every bank,
// positions ptr+1+k and ptr+2+k modulo BANK_DEPTH, i.e. the bank's samples in
// order from the oldest. Results are on `rd_data` two clocks later, laid out
// as in ir_buffer: rd_data[2*b] and rd_data[2*b+1] from bank b.
//
// `in_valid` must not arrive during an update or a convolution (assertion).
// Contents start at zero. The structure follows the design's description and
// its buffer diagram; cycle timing and port names are this implementation's.
module audio_buffer
  import aurras_pkg::*;
#(
  parameter int unsigned IR_LEN     = IR_LEN_DEF,
  localparam int unsigned BANK_DEPTH = IR_LEN / NUM_BANKS,
  localparam int unsigned AW         = $clog2(BANK_DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  sample_t       in_sample,
  input  logic          in_valid,
  output logic          upd_done,
  input  logic [AW-1:0] rd_off,
  output sample_t       rd_data [2*NUM_BANKS],
  input  logic          advance,
  output logic [AW-1:0] ptr
);
  typedef enum logic [1:0] {U_IDLE, U_READ, U_WAIT, U_WRITE} upd_state_e;
  upd_state_e st;
  sample_t    new_q;

  // Circular address of position ptr+1+k (+1 for port B).
  function automatic logic [AW-1:0] wrap(input logic [AW:0] a);
    return (a >= (AW+1)'(BANK_DEPTH)) ? AW'(a - (AW+1)'(BANK_DEPTH)) : AW'(a);
  endfunction

  logic [AW-1:0] raddr_a, raddr_b;
  assign raddr_a = wrap((AW+1)'(ptr) + (AW+1)'(rd_off) + (AW+1)'(1));
  assign raddr_b = wrap((AW+1)'(ptr) + (AW+1)'(rd_off) + (AW+1)'(2));

  logic [15:0] dout_a [NUM_BANKS];
  logic [15:0] dout_b [NUM_BANKS];
  logic        updating;
  assign updating = (st != U_IDLE);

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic [15:0] din;
    if (b == NUM_BANKS - 1) begin : g_top
      assign din = new_q;
    end else begin : g_lower
      assign din = dout_a[b+1];
    end

    bram_dp #(.DEPTH(BANK_DEPTH), .WIDTH(SAMPLE_W)) u_bank (
      .clk,
      .addr_a(updating ? ptr : raddr_a), .we_a(st == U_WRITE), .din_a(din),
      .dout_a(dout_a[b]),
      .addr_b(raddr_b), .dout_b(dout_b[b])
    );

    assign rd_data[2*b]   = sample_t'(dout_a[b]);
    assign rd_data[2*b+1] = sample_t'(dout_b[b]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= U_IDLE;
      new_q    <= '0;
      ptr      <= '0;
      upd_done <= 1'b0;
    end else begin
      upd_done <= 1'b0;
      unique case (st)
        U_IDLE:  if (in_valid) begin
                   new_q <= in_sample;
                   st    <= U_READ;
                 end
        U_READ:  st <= U_WAIT;
        U_WAIT:  st <= U_WRITE;
        U_WRITE: begin
                   st       <= U_IDLE;
                   upd_done <= 1'b1;
                 end
        default: st <= U_IDLE;
      endcase
      if (advance)
        ptr <= (ptr == AW'(BANK_DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (rst) in_valid |-> st == U_IDLE)
    else $error("audio_buffer: sample arrived during an update");

endmodule
