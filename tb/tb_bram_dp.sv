// tb_bram_dp: random writes and reads on both ports against an array model;
// read data must appear two clocks after the address, and a write must return
// the old word on port A (read-first). Also checks the zero initial contents.
module tb_bram_dp;
  localparam int unsigned DEPTH = 100, WIDTH = 16, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic we_a = 1'b0;
  logic [WIDTH-1:0] din_a = '0, dout_a, dout_b;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  always #5 clk = ~clk;
  bram_dp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected outputs, pipelined two deep
  logic [WIDTH-1:0] exp_a [2], exp_b [2];
  logic             chk [2];

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    chk[0] = 0; chk[1] = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (chk[1]) begin
        check(dout_a == exp_a[1], $sformatf("port A got %h expected %h", dout_a, exp_a[1]));
        check(dout_b == exp_b[1], $sformatf("port B got %h expected %h", dout_b, exp_b[1]));
      end
      chk[1] = chk[0]; exp_a[1] = exp_a[0]; exp_b[1] = exp_b[0];
      addr_a = AW'($urandom_range(DEPTH - 1));
      addr_b = AW'($urandom_range(DEPTH - 1));
      we_a   = (n > 300) && ($urandom_range(1) == 1);
      din_a  = WIDTH'($urandom);
      exp_a[0] = model[addr_a];
      exp_b[0] = (we_a && addr_a == addr_b) ? model[addr_b] : model[addr_b];
      chk[0] = 1;
      if (we_a) model[addr_a] = din_a;
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
