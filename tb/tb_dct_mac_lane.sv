// tb_dct_mac_lane: multiply-accumulate lane. Runs random 8-term inner
// products back to back (clear on the first term of each), and checks the
// 32-bit accumulator and the rounded, saturated 16-bit result for both
// output scalings (>> 12 for the row pass, >> 16 for the column pass)
// against integer arithmetic. Large operands make saturation happen in both
// directions; the test counts that it did.
module tb_dct_mac_lane;
  import dct_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n = 1'b0, en = 1'b0, clear = 1'b0, col_pass = 1'b0;
  sample_t x = '0, c = '0;
  logic signed [31:0] acc;
  sample_t y;
  int checks = 0, failures = 0, n_sat = 0;

  dct_mac_lane dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(longint s, int sh);
    longint r;
    r = (s + (longint'(1) << (sh - 1))) >>> sh;
    if (r > 32767)  return 32767;
    if (r < -32768) return -32768;
    return int'(r);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 300; t++) begin
      longint s;
      logic   big;
      big = (t % 5 == 0);
      s = 0;
      for (int n = 0; n < 8; n++) begin
        sample_t xv, cv;
        xv = big ? sample_t'($urandom) : sample_t'($urandom_range(600, 0) - 300);
        cv = sample_t'($urandom_range(16384, 0) - 8192);
        @(negedge clk);
        en = 1'b1; clear = (n == 0); x = xv; c = cv;
        s += longint'(xv) * longint'(cv);
      end
      @(negedge clk);
      en = 1'b0; clear = 1'b0;
      checks++;
      if (longint'(acc) != s) begin
        failures++;
        $display("FAIL acc %0d want %0d", acc, s);
      end
      col_pass = 1'b0; #1;
      checks++;
      if (int'(y) != ref_y(s, 12)) begin
        failures++;
        $display("FAIL row y %0d want %0d", y, ref_y(s, 12));
      end
      if (ref_y(s, 12) == 32767 || ref_y(s, 12) == -32768) n_sat++;
      col_pass = 1'b1; #1;
      checks++;
      if (int'(y) != ref_y(s, 16)) begin
        failures++;
        $display("FAIL col y %0d want %0d", y, ref_y(s, 16));
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("saturated results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
