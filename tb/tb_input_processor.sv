// tb_input_processor: raw 48 kHz samples sitting on a -900 baseline go
// through DC removal, low-pass filter and decimator. Checks: one output per
// two inputs, 58-clock latency for kept samples, a -900 baseline becomes 0
// after calibration (within 2 LSB), and a step of +500 above the baseline
// settles to +500 at the output (within 5 LSB, the filter's DC gain is 0.997).
module tb_input_processor;
  import aurras_pkg::*;
  localparam int unsigned AVG_SHIFT = 4;

  logic clk = 1'b0, rst = 1'b1, calibrate = 1'b0, in_valid = 1'b0, out_valid, cal_busy;
  sample_t in_sample = '0, out_sample;
  int checks = 0, failures = 0;
  int nin = 0, nout = 0;

  always #5 clk = ~clk;
  input_processor #(.AVG_SHIFT(AVG_SHIFT)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && out_valid) nout++;

  int last_out;
  task automatic send(input int v, input bit check_lat);
    int lat;
    @(negedge clk);
    in_sample = sample_t'(v);
    in_valid  = 1'b1;
    nin++;
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 80) begin @(negedge clk); lat++; end
    if (out_valid) last_out = out_sample;
    if (check_lat) check((nin % 2 == 1) ? lat == 58 : lat == 80, $sformatf("latency %0d for input %0d", lat, nin));
    repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 40; i++) send(-900, 1'b1);
    check(last_out >= -905 && last_out <= -895, $sformatf("uncalibrated baseline %0d", last_out));
    @(negedge clk); calibrate = 1'b1;
    @(negedge clk); calibrate = 1'b0;
    for (int i = 0; i < 80; i++) send(-900, 1'b0);
    check(!cal_busy, "calibration done");
    check(last_out >= -2 && last_out <= 2, $sformatf("calibrated baseline %0d", last_out));
    for (int i = 0; i < 80; i++) send(-400, 1'b0);
    check(last_out >= 495 && last_out <= 505, $sformatf("step response %0d", last_out));
    check(nout * 2 == nin, $sformatf("rate: %0d in, %0d out", nin, nout));
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
