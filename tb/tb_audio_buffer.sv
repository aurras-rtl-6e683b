// tb_audio_buffer: pushes random samples into a small cascading buffer
// (IR_LEN = 32, banks of 8) and after each one reads the whole buffer through
// the eight-word read port. Bank b, offset k must hold history sample
// b*8 + k counted from the oldest of the last 32, i.e. x[n - (31 - (b*8+k))],
// with zeros before the first sample. The pointer must advance and wrap, and
// the update must finish (upd_done) 4 clocks after in_valid.
module tb_audio_buffer;
  import aurras_pkg::*;
  localparam int unsigned IR_LEN = 32, D = IR_LEN / 4, AW = $clog2(D);
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, upd_done, advance = 1'b0;
  sample_t in_sample = '0;
  logic [AW-1:0] rd_off = '0, ptr;
  sample_t rd_data [8];
  int checks = 0, failures = 0;
  int hist [$];

  always #5 clk = ~clk;
  audio_buffer #(.IR_LEN(IR_LEN)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int lat;
    for (int i = 0; i < IR_LEN; i++) hist.push_back(0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 80; n++) begin
      check(ptr == AW'(n % D), $sformatf("pointer %0d at sample %0d", ptr, n));
      @(negedge clk);
      in_sample = sample_t'($urandom);
      in_valid  = 1'b1;
      hist.push_back(int'(in_sample));
      void'(hist.pop_front());
      @(negedge clk);
      in_valid = 1'b0;
      lat = 1;
      while (!upd_done && lat < 20) begin @(negedge clk); lat++; end
      check(lat == 4, $sformatf("update latency %0d", lat));
      for (int k = 0; k < D; k += 2) begin
        rd_off = AW'(k);
        repeat (2) @(negedge clk);
        for (int b = 0; b < 4; b++) begin
          check(rd_data[2*b] == sample_t'(hist[b*D + k]),
                $sformatf("n=%0d bank %0d pos %0d: %0d vs %0d", n, b, k, rd_data[2*b], hist[b*D+k]));
          check(rd_data[2*b+1] == sample_t'(hist[b*D + k + 1]),
                $sformatf("n=%0d bank %0d pos %0d", n, b, k + 1));
        end
      end
      @(negedge clk); advance = 1'b1;
      @(negedge clk); advance = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
