// tb_impulse_gen: starts the impulse twice between irregular sample ticks and
// checks that the level rises right after the next tick, stays at AMPLITUDE
// for exactly PULSE_SAMPLES ticks, returns to 0, and that `fired` and `done`
// pulse on those ticks.
module tb_impulse_gen;
  import aurras_pkg::*;
  localparam int unsigned PULSE = 3;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, tick = 1'b0;
  sample_t level;
  logic fired, done, active;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  impulse_gen #(.AMPLITUDE(16'sh6000), .PULSE_SAMPLES(PULSE)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic do_tick();
    @(negedge clk); tick = 1'b1;
    @(negedge clk); tick = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) begin
      do_tick();
      check(level == 0 && !active, "idle");
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      repeat (5) @(negedge clk);
      check(level == 0 && active, "armed, waiting for a tick");
      do_tick();
      check(fired, "fired with the first tick");
      for (int t = 0; t < PULSE; t++) begin
        check(level == 16'sh6000, $sformatf("high in sample %0d", t));
        repeat ($urandom_range(6)) @(negedge clk);
        check(level == 16'sh6000, "stays high between ticks");
        do_tick();
        if (t == PULSE - 1) check(done, "done with the last tick");
        else                check(!done, "no early done");
      end
      check(level == 0, "back to zero");
      do_tick();
      check(level == 0 && !fired && !done, "stays at zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
