// tb_decimator: sends numbered samples at irregular intervals and checks that
// exactly the 1st, 3rd, 5th, ... come out, in order, one clock after input.
module tb_decimator;
  import aurras_pkg::*;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  sample_t in_sample = '0, out_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  decimator #(.FACTOR(2)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int nout = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      in_sample = sample_t'(i * 7 - 300);
      in_valid  = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      if (i % 2 == 0) begin
        check(out_valid && out_sample == sample_t'(i * 7 - 300), $sformatf("sample %0d kept", i));
        nout++;
      end else begin
        check(!out_valid, $sformatf("sample %0d dropped", i));
      end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    check(nout == 50, "half the samples");
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
