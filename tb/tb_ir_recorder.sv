// tb_ir_recorder: calibration-microphone samples are numbered by their tick
// (value = 100 + tick index, tick T0 being the one in which the impulse
// starts). With delay d, IR sample j must be the value of tick T(d+1+j) and be
// written to reversed position IR_LEN-1-j (bank, word). Also checks the
// impulse level, busy/done, the number of writes, and that a second
// measurement with another delay overwrites the buffer correctly.
module tb_ir_recorder;
  import aurras_pkg::*;
  localparam int unsigned IR_LEN = 32, D = IR_LEN / 4, AW = $clog2(D), PULSE = 2;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, in_valid = 1'b0;
  logic [5:0] delay = '0;
  sample_t in_sample = '0, impulse, wr_data;
  logic wr_en, busy, done;
  logic [1:0] wr_bank;
  logic [AW-1:0] wr_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ir_recorder #(.IR_LEN(IR_LEN), .DELAY_W(6), .PULSE_SAMPLES(PULSE)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  sample_t mem [IR_LEN];
  int nwrites = 0, ndone = 0;
  always @(posedge clk) if (!rst) begin
    if (wr_en) begin mem[int'(wr_bank) * D + int'(wr_addr)] <= wr_data; nwrites++; end
    if (done) ndone++;
  end

  int tick_no;     // index of the next tick relative to T0
  int imp_ticks;

  task automatic measure(input int d);
    int w0;
    delay = 6'(d);
    w0 = nwrites;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    check(busy, "busy after start");
    tick_no = 0; imp_ticks = 0;
    while (busy) begin
      repeat (5) @(negedge clk);
      in_sample = sample_t'(100 + tick_no);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      if (impulse != 0) begin
        check(impulse == 16'sh6000, "impulse level");
        imp_ticks++;
      end
      tick_no++;
      if (tick_no > 200) break;
    end
    check(imp_ticks == PULSE, $sformatf("impulse lasted %0d samples", imp_ticks));
    check(nwrites - w0 == IR_LEN, $sformatf("%0d writes", nwrites - w0));
    for (int j = 0; j < IR_LEN; j++)
      check(mem[IR_LEN - 1 - j] == sample_t'(100 + d + 1 + j),
            $sformatf("d=%0d IR[%0d] = %0d expected %0d", d, j, mem[IR_LEN-1-j], 100 + d + 1 + j));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // a few idle ticks: nothing may be written
    repeat (4) begin
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
    end
    check(nwrites == 0 && !busy, "idle recorder writes nothing");
    measure(5);
    measure(0);
    measure(24);
    check(ndone == 3, "one done per measurement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
