// ir_recorder: measures the room's impulse response and stores it, reversed,
// in the IR buffer.
//
// A rising edge on `start` (button BTN3) plays an impulse on the calibration
// speaker through impulse_gen. Counting from the sample period in which the
// impulse starts, the recorder lets `delay` calibration-microphone samples
// pass (the speaker-to-microphone flight time, the same value the delay
// module uses) and then records the next IR_LEN samples: with T0 the sample
// tick in which the impulse starts, the sample arriving at tick T(delay+1+j)
// becomes IR sample j (one second at
// 24 kHz). IR sample j is written to reversed position r = IR_LEN-1-j, i.e.
// bank r / BANK_DEPTH, word r % BANK_DEPTH, using two down-counters, so the
// first sample recorded ends up as the last word of bank 3. `done` pulses
// after the last write; `busy` is high from `start` to then.
//
// The microphone samples come from the calibration input processor at 24 kHz
// and one is written per `in_valid`. Following the design: impulse, flight
// time wait, one-second recording, reversed storage. Own choices: the wait is
// counted from the start of the impulse, and a new `start` is ignored while
// busy.
module ir_recorder
  import aurras_pkg::*;
#(
  parameter int unsigned IR_LEN        = IR_LEN_DEF,
  parameter int unsigned DELAY_W       = 6,
  parameter int unsigned PULSE_SAMPLES = 4,
  localparam int unsigned BANK_DEPTH   = IR_LEN / NUM_BANKS,
  localparam int unsigned AW           = $clog2(BANK_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [DELAY_W-1:0] delay,
  input  sample_t            in_sample,   // calibration microphone, 24 kHz
  input  logic               in_valid,
  output sample_t            impulse,     // to the calibration speaker
  output logic               wr_en,
  output logic [1:0]         wr_bank,
  output logic [AW-1:0]      wr_addr,
  output sample_t            wr_data,
  output logic               busy,
  output logic               done
);
  typedef enum logic [1:0] {R_IDLE, R_IMPULSE, R_WAIT, R_RECORD} rec_state_e;
  rec_state_e st;

  logic               start_d;
  logic               imp_start, imp_fired, imp_done, imp_active;
  logic [DELAY_W-1:0] wait_cnt;

  assign imp_start = start && !start_d && (st == R_IDLE);

  impulse_gen #(.PULSE_SAMPLES(PULSE_SAMPLES)) u_imp (
    .clk, .rst, .start(imp_start), .tick(in_valid),
    .level(impulse), .fired(imp_fired), .done(imp_done), .active(imp_active)
  );

  // Tick T0 is the one in which the impulse starts; the sample that arrives
  // at tick T(delay+1+j) is stored as IR sample j.
  logic          take;
  logic [1:0]    rec_bank;
  logic [AW-1:0] rec_addr;

  assign take = in_valid && ((st == R_RECORD) || (st == R_WAIT && wait_cnt == '0));

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= R_IDLE;
      start_d  <= 1'b0;
      wait_cnt <= '0;
      rec_bank <= '0;
      rec_addr <= '0;
      wr_en    <= 1'b0;
      wr_bank  <= '0;
      wr_addr  <= '0;
      wr_data  <= '0;
      done     <= 1'b0;
    end else begin
      start_d <= start;
      wr_en   <= 1'b0;
      done    <= 1'b0;
      unique case (st)
        R_IDLE: if (imp_start) st <= R_IMPULSE;
        R_IMPULSE: if (imp_fired) begin
          wait_cnt <= delay;
          rec_bank <= 2'(NUM_BANKS - 1);
          rec_addr <= AW'(BANK_DEPTH - 1);
          st       <= R_WAIT;
        end
        R_WAIT: if (in_valid) begin
          if (wait_cnt == '0) st <= R_RECORD;
          else                wait_cnt <= wait_cnt - 1'b1;
        end
        R_RECORD: ;
        default: st <= R_IDLE;
      endcase

      if (take) begin
        wr_en   <= 1'b1;
        wr_bank <= rec_bank;
        wr_addr <= rec_addr;
        wr_data <= in_sample;
        if (rec_addr == '0) begin
          rec_addr <= AW'(BANK_DEPTH - 1);
          rec_bank <= rec_bank - 1'b1;
          if (rec_bank == '0) begin
            st   <= R_IDLE;
            done <= 1'b1;
          end
        end else begin
          rec_addr <= rec_addr - 1'b1;
        end
      end
    end
  end

  assign busy = (st != R_IDLE) || imp_active || wr_en;

endmodule
