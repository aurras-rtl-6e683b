// impulse_gen: test impulse for the calibration speaker.
//
// On `start` the output steps from 0 to AMPLITUDE and stays there for
// PULSE_SAMPLES audio sample periods (counted on `tick`, the 24 kHz sample
// strobe), then returns to 0. Two sample-aligned triggers let other modules
// line up with the impulse: `fired` pulses with the first tick of the
// impulse (the sample period in which it starts sounding) and `done` with the
// tick that ends it.
//
// The design gives the shape ("0 to a large value for a few cycles and then
// back to 0") and the trigger outputs; AMPLITUDE and PULSE_SAMPLES are this
// implementation's choice.
module impulse_gen
  import aurras_pkg::*;
#(
  parameter sample_t     AMPLITUDE     = 16'sh6000,
  parameter int unsigned PULSE_SAMPLES = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  logic    tick,
  output sample_t level,
  output logic    fired,
  output logic    done,
  output logic    active
);
  typedef enum logic [1:0] {I_IDLE, I_ARMED, I_HIGH} imp_state_e;
  imp_state_e st;
  logic [$clog2(PULSE_SAMPLES+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= I_IDLE;
      cnt   <= '0;
      fired <= 1'b0;
      done  <= 1'b0;
    end else begin
      fired <= 1'b0;
      done  <= 1'b0;
      unique case (st)
        I_IDLE:  if (start) st <= I_ARMED;
        I_ARMED: if (tick) begin           // align the step to a sample boundary
          st    <= I_HIGH;
          cnt   <= '0;
          fired <= 1'b1;
        end
        I_HIGH:  if (tick) begin
          if (cnt == $bits(cnt)'(PULSE_SAMPLES - 1)) begin
            st   <= I_IDLE;
            done <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: st <= I_IDLE;
      endcase
    end
  end

  assign level  = (st == I_HIGH) ? AMPLITUDE : '0;
  assign active = (st != I_IDLE);

endmodule
