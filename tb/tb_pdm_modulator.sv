// tb_pdm_modulator: for several constant inputs, counts the ones in 65536
// modulator steps; the count must equal (x + 32768 + OFFSET), clipped to
// 0..65535, within 1. Also checks that the output only changes on the
// CE_DIV-clock enable (rate 98.304 MHz / 16 = 6.144 MHz).
module tb_pdm_modulator;
  import aurras_pkg::*;
  localparam int unsigned CE_DIV = 2;
  localparam int OFFSET = 1024;
  logic clk = 1'b0, rst = 1'b1, pdm;
  sample_t in_sample = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pdm_modulator #(.CE_DIV(CE_DIV), .OFFSET(OFFSET)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int vals [6] = '{0, -32768, 32767, 1000, -20000, -33000 + 300};

  initial begin
    int ones, e, changes_off_enable;
    logic prev;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (vals[i]) begin
      in_sample = sample_t'(vals[i]);
      repeat (CE_DIV * 4) @(negedge clk);
      ones = 0;
      changes_off_enable = 0;
      prev = pdm;
      for (int s = 0; s < 65536; s++) begin
        @(negedge clk);
        if (pdm) ones++;
        if (pdm != prev) changes_off_enable++;   // changes on this clock
        prev = pdm;
        @(negedge clk);
        if (pdm != prev) changes_off_enable += 1000000;  // never on the other one
        prev = pdm;
      end
      e = int'(sample_t'(vals[i])) + 32768 + OFFSET;
      if (e > 65535) e = 65535;
      if (e < 0) e = 0;
      check(ones >= e - 1 && ones <= e + 1, $sformatf("input %0d: %0d ones, expected %0d", vals[i], ones, e));
      check(changes_off_enable < 1000000, "output changes only at the clock enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
