// tb_fast_multiplier: signed carry-save multiplier against integer products.
// The default 16x16 instance gets corner operands (the most negative value
// times itself, -1, 0) and 3000 random pairs; a 4x4 instance, the size the
// summand-reduction example works with, is tested exhaustively.
module tb_fast_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] a, b;
  logic signed [31:0] p;
  logic signed [3:0]  a4, b4;
  logic signed [7:0]  p4;
  int checks = 0, failures = 0;

  fast_multiplier dut (.a(a), .b(b), .p(p));
  fast_multiplier #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .p(p4));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x, int y);
    longint e;
    a = 16'(x); b = 16'(y);
    @(posedge clk);
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      $display("FAIL %0d*%0d -> %0d", a, b, p);
    end
  endtask

  initial begin
    apply(-32768, -32768);
    apply(-32768, 32767);
    apply(-1, -1);
    apply(0, -12345);
    apply(32767, 32767);
    apply(137, 5793);
    for (int i = 0; i < 3000; i++) apply(int'($urandom), int'($urandom));
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      @(posedge clk);
      checks++;
      if (int'(p4) != int'(a4) * int'(b4)) begin
        failures++;
        $display("FAIL 4x4 %0d*%0d -> %0d", a4, b4, p4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
