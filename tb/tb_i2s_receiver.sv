// tb_i2s_receiver: drives the I2S receiver from a microphone model sending
// random 18-bit words and checks that each 16-bit output is the word's upper
// 16 bits, that samples come exactly 64 bit clocks apart, that SCK has period
// SCK_DIV and that WS toggles every 32 bit clocks on a falling SCK edge.
module tb_i2s_receiver;
  import aurras_pkg::*;
  localparam int unsigned SCK_DIV = 4;

  logic clk = 1'b0, rst = 1'b1;
  logic sck, ws, sd, valid, frame_start;
  sample_t sample;
  logic signed [17:0] word, cur_word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  i2s_receiver #(.SCK_DIV(SCK_DIV)) dut (.clk, .rst, .sck, .ws, .sd, .sample, .valid);
  i2s_mic_model mic (.sck, .ws, .word, .sd, .cur_word, .frame_start);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // new random word for every frame
  always @(posedge frame_start) word <= 18'($urandom);

  int cyc = 0, last_valid = -1, nvalid = 0, last_sck_rise = -1, last_ws_edge = -1;
  logic sck_d = 1'b0, ws_d = 1'b0;
  always @(posedge clk) begin
    cyc++;
    sck_d <= sck;
    ws_d  <= ws;
    if (!rst && sck && !sck_d) begin
      if (last_sck_rise >= 0) check(cyc - last_sck_rise == SCK_DIV, "SCK period");
      last_sck_rise = cyc;
    end
    if (!rst && ws != ws_d) begin
      check(!sck && sck_d, "WS changes with the SCK falling edge");
      if (last_ws_edge >= 0) check(cyc - last_ws_edge == 32 * SCK_DIV, "WS half period");
      last_ws_edge = cyc;
    end
    if (valid && !rst) begin
      nvalid++;
      if (nvalid > 1) begin
        check(sample == sample_t'(cur_word >>> 2),
              $sformatf("sample %0d: got %0d expected %0d", nvalid, sample, cur_word >>> 2));
        check(cyc - last_valid == 64 * SCK_DIV, $sformatf("sample period %0d at %0d", cyc - last_valid, nvalid));
      end
      last_valid = cyc;
    end
  end

  initial begin
    word = 18'sh2_0001;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    wait (nvalid == 40);
    // the extreme values
    @(posedge frame_start); word <= 18'sh1_ffff;
    @(posedge frame_start); word <= 18'sh2_0000;
    repeat (3) @(posedge frame_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
