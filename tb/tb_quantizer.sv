// tb_quantizer: JPEG quantisation and de-quantisation at all 64 table
// positions. Quantisation must equal v/Q rounded to nearest (ties away
// from zero, computed here with integer division), allowing one step of
// difference only where the reciprocal cannot resolve a value within
// 1/Q of a rounding boundary; de-quantisation must equal q*Q saturated to
// 16 bits. The JPEG luminance table is written out here independently.
module tb_quantizer;
  import dct_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    dequant;
  idx_t    row, col;
  sample_t value, result;
  int checks = 0, failures = 0, n_sat = 0;

  quantizer dut (.*);

  localparam int QT [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,  12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,  14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,  24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,  72, 92, 95, 98, 112, 100, 103,  99};

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      int q;
      q = QT[i];
      for (int t = 0; t < 40; t++) begin
        int v, mag, e, d;
        v = (t == 0) ? -32768 : (t == 1) ? 32767 : (t < 20) ? int'($urandom_range(4000, 0)) - 2000
                                                           : int'(signed'(16'($urandom)));
        dequant = 1'b0; row = idx_t'(i / 8); col = idx_t'(i % 8); value = sample_t'(v);
        @(posedge clk);
        mag = (v < 0) ? -v : v;
        e = (2 * mag + q) / (2 * q);
        if (v < 0) e = -e;
        d = int'(result) - e;
        checks++;
        if (d > 1 || d < -1) begin
          failures++;
          $display("FAIL quant %0d/%0d -> %0d want %0d", v, q, result, e);
        end else if (d != 0) begin
          // only allowed right at a rounding boundary
          int rem;
          rem = (2 * mag + q) % (2 * q);
          checks++;
          if (rem > 2 * mag / q + 2 && rem < 2 * q - 2 * mag / q - 2) begin
            failures++;
            $display("FAIL quant off by one away from a boundary %0d/%0d", v, q);
          end
        end
        // de-quantise a value in the quantised range and a large one
        v = (t < 30) ? int'($urandom_range(600, 0)) - 300 : int'(signed'(16'($urandom)));
        dequant = 1'b1; value = sample_t'(v);
        @(posedge clk);
        e = v * q;
        if (e > 32767) begin e = 32767; n_sat++; end
        if (e < -32768) begin e = -32768; n_sat++; end
        checks++;
        if (int'(result) != e) begin
          failures++;
          $display("FAIL dequant %0d*%0d -> %0d want %0d", v, q, result, e);
        end
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
