// tb_cla_adder: 16-bit cascaded CLA adder against integer addition.
// Corner operands (0, all ones, carry chains through every slice) and 3000
// random pairs with both carry-in values.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] x, logic [15:0] y, logic ci);
    int exp_total;
    a = x; b = y; cin = ci;
    @(posedge clk);
    exp_total = int'(x) + int'(y) + int'(ci);
    checks++;
    if ({cout, sum} != 17'(exp_total)) begin
      failures++;
      $display("FAIL %h+%h+%0d -> %h", x, y, ci, {cout, sum});
    end
  endtask

  initial begin
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1);   // carry through all four slices
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'h0FFF, 16'h0001, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 3000; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
