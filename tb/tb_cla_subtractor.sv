// tb_cla_subtractor: 16-bit two's-complement subtractor against integer
// subtraction: difference, no-borrow (a >= b unsigned) and signed overflow.
module tb_cla_subtractor;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b, diff;
  logic        no_borrow, overflow;
  int checks = 0, failures = 0;

  cla_subtractor dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] x, logic [15:0] y);
    int sd;
    a = x; b = y;
    @(posedge clk);
    sd = int'(signed'(x)) - int'(signed'(y));
    checks++;
    if (diff != 16'(int'(x) - int'(y))) begin
      failures++;
      $display("FAIL %h-%h -> %h", x, y, diff);
    end
    checks++;
    if (no_borrow != (x >= y)) failures++;
    checks++;
    if (overflow != (sd > 32767 || sd < -32768)) begin
      failures++;
      $display("FAIL overflow %h-%h", x, y);
    end
  endtask

  initial begin
    apply(16'd0, 16'd0);
    apply(16'd5, 16'd7);
    apply(16'h8000, 16'd1);       // signed overflow
    apply(16'h7FFF, 16'hFFFF);    // 32767 - (-1) overflows
    apply(16'hFFFF, 16'hFFFF);
    for (int i = 0; i < 3000; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
