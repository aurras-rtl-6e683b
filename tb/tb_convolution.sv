// tb_convolution: the convolution engine with its two four-bank buffers.
//
// Small instance (IR_LEN = 64): a random impulse response is written into
// the IR buffer time-reversed, exactly as the recorder stores it; then 150
// random samples are pushed through. Each output must equal bits [28:13] of
// sum_m x[n-m]*h[m] computed directly, and arrive IR_LEN/8 + 10 clocks after
// the buffer update finishes.
// Full-size instance (IR_LEN = 24000): one sample, checking that an output
// takes 3010 clocks, within the 4096 clocks of a 24 kHz sample period.
module tb_convolution;
  import aurras_pkg::*;
  localparam int unsigned IR_LEN = 64, D = IR_LEN / 4, AW = $clog2(D);

  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- small instance ----
  logic ir_we = 1'b0;
  logic [1:0] ir_bank = '0;
  logic [AW-1:0] ir_addr = '0, rd_off, ptr;
  sample_t ir_wdata = '0, in_sample = '0, out_sample;
  logic in_valid = 1'b0, upd_done, done, out_valid, busy;
  sample_t a_words [8], i_words [8];

  ir_buffer #(.IR_LEN(IR_LEN)) u_ir (.clk, .wr_en(ir_we), .wr_bank(ir_bank), .wr_addr(ir_addr),
    .wr_data(ir_wdata), .rd_addr(rd_off), .rd_data(i_words));
  audio_buffer #(.IR_LEN(IR_LEN)) u_ab (.clk, .rst, .in_sample, .in_valid, .upd_done,
    .rd_off, .rd_data(a_words), .advance(done), .ptr);
  convolution #(.IR_LEN(IR_LEN)) dut (.clk, .rst, .start(upd_done), .rd_off,
    .audio_data(a_words), .ir_data(i_words), .out_sample, .out_valid, .done, .busy);

  // ---- full-size instance ----
  localparam int unsigned FD = IR_LEN_DEF / 4, FAW = $clog2(FD);
  logic [FAW-1:0] f_off, f_ptr;
  sample_t f_in = '0, f_out;
  logic f_valid = 1'b0, f_upd, f_done, f_ovalid, f_busy;
  sample_t fa_words [8], fi_words [8];

  ir_buffer u_fir (.clk, .wr_en(1'b0), .wr_bank(2'd0), .wr_addr('0), .wr_data('0),
    .rd_addr(f_off), .rd_data(fi_words));
  audio_buffer u_fab (.clk, .rst, .in_sample(f_in), .in_valid(f_valid), .upd_done(f_upd),
    .rd_off(f_off), .rd_data(fa_words), .advance(f_done), .ptr(f_ptr));
  convolution u_fconv (.clk, .rst, .start(f_upd), .rd_off(f_off),
    .audio_data(fa_words), .ir_data(fi_words), .out_sample(f_out), .out_valid(f_ovalid),
    .done(f_done), .busy(f_busy));

  int h [IR_LEN];
  int x [$];

  initial begin
    longint acc;
    int lat, r;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // record a random IR, reversed
    for (int j = 0; j < IR_LEN; j++) begin
      h[j] = int'($urandom_range(65535)) - 32768;
      r = IR_LEN - 1 - j;
      @(negedge clk);
      ir_we = 1'b1; ir_bank = 2'(r / D); ir_addr = AW'(r % D); ir_wdata = sample_t'(h[j]);
    end
    @(negedge clk); ir_we = 1'b0;

    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      in_sample = sample_t'(int'($urandom_range(65535)) - 32768);
      in_valid  = 1'b1;
      x.push_front(int'(in_sample));     // x[0] is the newest
      @(negedge clk);
      in_valid = 1'b0;
      wait (upd_done);
      @(negedge clk);
      lat = 0;
      while (!out_valid && lat < 200) begin @(negedge clk); lat++; end
      check(lat == D / 2 + 10, $sformatf("latency %0d", lat));
      acc = 0;
      for (int m = 0; m < IR_LEN && m < x.size(); m++) acc += longint'(x[m]) * longint'(h[m]);
      check(out_sample == sample_t'(acc >>> 13),
            $sformatf("n=%0d out %0d expected %0d", n, out_sample, sample_t'(acc >>> 13)));
      repeat (3) @(negedge clk);
    end

    // full size: cycle count of one output
    @(negedge clk); f_in = 16'sd1000; f_valid = 1'b1;
    @(negedge clk); f_valid = 1'b0;
    wait (f_upd);
    @(negedge clk);
    lat = 0;
    while (!f_ovalid && lat < 5000) begin @(negedge clk); lat++; end
    check(lat == FD / 2 + 10, $sformatf("full-size convolution took %0d clocks", lat));
    check(lat + 5 < CYCLES_PER_SMP, "fits in one 24 kHz sample period");
    check(f_out == 0, "empty IR gives silence");
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
