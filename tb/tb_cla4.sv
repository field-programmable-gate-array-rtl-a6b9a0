// tb_cla4: exhaustive test of the 4-bit carry look-ahead block.
// All 512 combinations of a, b and cin are applied; sum and cout are
// compared with integer addition, the block propagate with &(a|b) and the
// block generate with the carry-out for cin = 0.
module tb_cla4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a, b, sum;
  logic       cin, cout, grp_g, grp_p;
  int checks = 0, failures = 0;

  cla4 dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      int exp_total;
      {cin, a, b} = 9'(i);
      @(posedge clk);
      exp_total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} != 5'(exp_total)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", a, b, cin, {cout, sum});
      end
      checks++;
      if (grp_p != &(a | b)) failures++;
      checks++;
      if (grp_g != ((int'(a) + int'(b)) > 15)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
