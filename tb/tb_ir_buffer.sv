// tb_ir_buffer: fills a small four-bank IR buffer with random words, then
// reads every even address and checks all eight outputs two clocks later.
module tb_ir_buffer;
  import aurras_pkg::*;
  localparam int unsigned IR_LEN = 48, D = IR_LEN / 4, AW = $clog2(D);
  logic clk = 1'b0, wr_en = 1'b0;
  logic [1:0] wr_bank = '0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  sample_t wr_data = '0;
  sample_t rd_data [8];
  int checks = 0, failures = 0;
  sample_t model [4][D];

  always #5 clk = ~clk;
  ir_buffer #(.IR_LEN(IR_LEN)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_bank = 2'(b); wr_addr = AW'(a); wr_data = sample_t'($urandom);
        model[b][a] = wr_data;
      end
    @(negedge clk); wr_en = 1'b0;
    for (int rep = 0; rep < 3; rep++)
      for (int a = 0; a < D; a += 2) begin
        rd_addr = AW'(a);
        repeat (2) @(negedge clk);
        for (int b = 0; b < 4; b++) begin
          check(rd_data[2*b] == model[b][a], $sformatf("bank %0d word %0d", b, a));
          check(rd_data[2*b+1] == model[b][a+1], $sformatf("bank %0d word %0d", b, a + 1));
        end
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
