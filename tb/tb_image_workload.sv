// tb_image_workload: a whole 512x512 8-bit greyscale image (4096 blocks of
// 8x8) through the processor, first encoded (forward DCT + JPEG
// quantisation), then decoded (de-quantisation + inverse DCT).
//
// The image is generated here: smooth shading, a bright disc, a finely
// textured quarter and noise, standing in for a natural test image. For every block the
// quantised coefficients are checked against a floating-point reference
// (|out - round(Z/Q)| <= 1) and the non-zero coefficients are counted;
// the compression ratio of a block is 64 / (number of non-zero values), and
// the average over all blocks is printed. The decoded image is checked
// against a floating-point decode of the hardware's own quantised output
// (|pixel - ref| <= 1) and its PSNR against the original is printed and
// must exceed 28 dB. Blocks are streamed back to back: the encoder's input
// is never idle while the processor is ready.
module tb_image_workload;
  import dct_pkg::*;

  localparam int IMG    = 512;
  localparam int BLOCKS = (IMG / 8) * (IMG / 8);

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  dct_dir_e dir = DCT_FORWARD;
  logic     quant_en = 1'b1;
  logic     in_valid = 1'b0;
  logic     in_ready, out_valid, block_done;
  sample_t  din [N];
  sample_t  dout [N];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct2d_top dut (.*);

  initial begin : watchdog
    repeat (2 * BLOCKS * 150 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mr [8][8];   // reference DCT-II matrix, from the definition
  initial
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        mr[k][n] = ((k == 0) ? $sqrt(0.125) : 0.5) * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0);

  byte unsigned img   [IMG*IMG];
  int           coefs [BLOCKS*64];  // hardware's quantised coefficients
  int           recon [IMG*IMG];
  sample_t      out_q [$];

  always @(posedge clk)
    if (rst_n && out_valid)
      for (int c = 0; c < 8; c++) out_q.push_back(dout[c]);

  function automatic int pix(int b, int r, int c);
    int bx, by;
    bx = b % (IMG / 8);
    by = b / (IMG / 8);
    return int'(img[(by * 8 + r) * IMG + bx * 8 + c]);
  endfunction

  // stream all blocks; src(b, i) gives element i of block b
  task automatic stream(dct_dir_e d);
    for (int b = 0; b < BLOCKS; b++)
      for (int r = 0; r < 8; r++) begin
        in_valid <= 1'b1;
        dir      <= d;
        for (int c = 0; c < 8; c++)
          din[c] <= sample_t'((d == DCT_FORWARD) ? pix(b, r, c) : coefs[b*64 + r*8 + c]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    in_valid <= 1'b0;
  endtask

  function automatic void check_close(int got, real want, real tol);
    real e;
    e = real'(got) - want;
    if (e < 0.0) e = -e;
    checks++;
    if (e > tol) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d want %f", got, want);
    end
  endfunction

  initial begin
    longint nonzero_total;
    real    ratio_sum, sq, psnr;
    nonzero_total = 0;
    ratio_sum = 0.0;
    sq = 0.0;
    for (int c = 0; c < 8; c++) din[c] = '0;
    // test image
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        real v;
        v = 120.0 + 50.0 * $sin(x / 37.0) * $cos(y / 53.0) + 0.12 * (x - y);
        if ((x - 256) * (x - 256) + (y - 200) * (y - 200) < 90 * 90) v += 45.0;
        if (x > 300 && y > 300) v += 30.0 * $sin(x / 2.5) * $sin(y / 3.5);   // fine texture
        v += real'($urandom_range(16, 0)) - 8.0;
        if (v < 0.0) v = 0.0;
        if (v > 255.0) v = 255.0;
        img[y*IMG + x] = 8'(int'(v));
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // ---------------- encode
    fork
      stream(DCT_FORWARD);
      for (int b = 0; b < BLOCKS; b++) begin
        int nz;
        nz = 0;
        while (out_q.size() < 64) @(posedge clk);
        for (int k = 0; k < 8; k++)
          for (int l = 0; l < 8; l++) begin
            real z;
            int  got;
            z = 0.0;
            for (int r = 0; r < 8; r++)
              for (int c = 0; c < 8; c++)
                z += mr[k][r] * mr[l][c] * pix(b, r, c);
            got = int'(out_q.pop_front());
            coefs[b*64 + k*8 + l] = got;
            check_close(got, z / real'(jpeg_q(k, l)), 1.0);
            if (got != 0) nz++;
          end
        nonzero_total += nz;
        ratio_sum += 64.0 / real'((nz == 0) ? 1 : nz);
      end
    join

    // ---------------- decode
    fork
      stream(DCT_INVERSE);
      for (int b = 0; b < BLOCKS; b++) begin
        int bx, by;
        bx = b % (IMG / 8);
        by = b / (IMG / 8);
        while (out_q.size() < 64) @(posedge clk);
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            real x;
            int  got, p;
            x = 0.0;
            for (int k = 0; k < 8; k++)
              for (int l = 0; l < 8; l++)
                x += mr[k][r] * mr[l][c] * real'(coefs[b*64 + k*8 + l] * jpeg_q(k, l));
            got = int'(out_q.pop_front());
            check_close(got, x, 1.0);
            recon[(by*8 + r) * IMG + bx*8 + c] = got;
            p = got - pix(b, r, c);
            sq += real'(p * p);
          end
      end
    join

    psnr = 10.0 * $log10(255.0 * 255.0 / (sq / real'(IMG * IMG)));
    $display("blocks %0d, non-zero coefficients %0d, average compression ratio (64/non-zero) %f",
             BLOCKS, nonzero_total, ratio_sum / real'(BLOCKS));
    $display("overall ratio %f, reconstruction PSNR %f dB",
             64.0 * BLOCKS / real'(nonzero_total), psnr);
    checks++;
    if (psnr < 28.0) failures++;
    checks++;
    if (nonzero_total >= 64 * BLOCKS / 2) failures++;   // quantisation must compress
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
