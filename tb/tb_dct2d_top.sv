// tb_dct2d_top: end-to-end test of the 8x8 DCT processor at its default size.
//
// Sends blocks through the forward and inverse transform, with and without
// JPEG quantisation, and compares every output with a floating-point
// reference built here from the DCT definition (cos terms evaluated with
// $cos, not the processor's integer table):
//   forward:  |out - Z_ref| <= 1, Z_ref = M X M^T (orthonormal DCT-II)
//   forward+quant: |out - Z_ref/Q| <= 1
//   inverse (also after de-quantisation): |out - M^T Z M| <= 1
// It also checks a flat block (only the DC term, 8x the pixel value), the
// latency (first output row 130 cycles after the last input row), the
// back-to-back block period (145 cycles), and that in_valid is ignored while
// the processor is busy and that input gaps are absorbed. Each mechanism is
// counted and a failure is counted for any that never happened.
module tb_dct2d_top;
  import dct_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  dct_dir_e dir = DCT_FORWARD;
  logic     quant_en = 1'b0;
  logic     in_valid = 1'b0;
  logic     in_ready, out_valid, block_done;
  sample_t  din [N];
  sample_t  dout [N];

  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct2d_top dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  function automatic real mref(int k, int n);
    real a;
    a = (k == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
    return a * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0);
  endfunction

  typedef real rblk_t [64];
  typedef int  iblk_t [64];

  function automatic rblk_t fdct_ref(iblk_t x);
    rblk_t z;
    for (int k = 0; k < 8; k++)
      for (int l = 0; l < 8; l++) begin
        real s = 0.0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            s += mref(k, r) * mref(l, c) * x[r*8+c];
        z[k*8+l] = s;
      end
    return z;
  endfunction

  function automatic rblk_t idct_ref(iblk_t z);
    rblk_t x;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        real s = 0.0;
        for (int k = 0; k < 8; k++)
          for (int l = 0; l < 8; l++)
            s += mref(k, r) * mref(l, c) * z[k*8+l];
        x[r*8+c] = s;
      end
    return x;
  endfunction

  // ------------------------------------------------------------ output capture
  sample_t out_q [$];
  int      first_out_cycle [$];
  int      last_in_cycle;
  int      n_ignored = 0, n_gap = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (dut.u_ctrl.out_row == 0) first_out_cycle.push_back(cycle);
      for (int c = 0; c < 8; c++) out_q.push_back(dout[c]);
    end
    if (in_valid && !in_ready) n_ignored++;
    if (!in_valid && in_ready && rst_n) n_gap++;
    if (in_valid && in_ready && dut.u_ctrl.load_row == 7) last_in_cycle = cycle;
  end

  // ------------------------------------------------------------ driver
  int last_in_cycles [$];

  task automatic send_block(dct_dir_e d, logic q, iblk_t blk, int gaps);
    for (int r = 0; r < 8; r++) begin
      // optional idle cycles between rows
      for (int g = 0; g < gaps; g++) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      dir      <= d;
      quant_en <= q;
      for (int c = 0; c < 8; c++) din[c] <= sample_t'(blk[r*8+c]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (r == 7) last_in_cycles.push_back(cycle);
    end
    in_valid <= 1'b0;
  endtask

  task automatic get_block(output iblk_t blk);
    while (out_q.size() < 64) @(posedge clk);
    for (int i = 0; i < 64; i++) blk[i] = int'(out_q.pop_front());
  endtask

  function automatic void check_close(string what, int got, real want, real tol);
    real d;
    d = real'(got) - want;
    if (d < 0.0) d = -d;
    checks++;
    if (d > tol) begin
      failures++;
      $display("FAIL %s: got %0d want %f", what, got, want);
    end
  endfunction

  function automatic iblk_t random_pixels();
    iblk_t b;
    for (int i = 0; i < 64; i++) b[i] = int'($urandom_range(255, 0));
    return b;
  endfunction

  // counters of exercised mechanisms
  int n_fwd = 0, n_inv = 0, n_quant = 0, n_dequant = 0, n_flat = 0, n_b2b = 0;

  iblk_t x, y, zq;
  rblk_t zr, xr;

  initial begin
    for (int c = 0; c < 8; c++) din[c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. flat block, like a uniform image region (pixel value 137)
    for (int i = 0; i < 64; i++) x[i] = 137;
    send_block(DCT_FORWARD, 1'b0, x, 0);
    get_block(y);
    check_close("flat DC", y[0], 8.0 * 137.0, 0.0);
    for (int i = 1; i < 64; i++) check_close("flat AC", y[i], 0.0, 0.0);
    n_flat++; n_fwd++;
    // latency: first output row 130 cycles after the last input row
    checks++;
    if (first_out_cycle[0] - last_in_cycles[0] != 130) begin
      failures++;
      $display("FAIL latency %0d", first_out_cycle[0] - last_in_cycles[0]);
    end

    // 2. random forward transforms, some with input gaps
    for (int t = 0; t < 4; t++) begin
      x = random_pixels();
      zr = fdct_ref(x);
      send_block(DCT_FORWARD, 1'b0, x, t % 2);
      get_block(y);
      for (int i = 0; i < 64; i++) check_close("fdct", y[i], zr[i], 1.0);
      n_fwd++;
    end

    // 3. forward with quantisation
    for (int t = 0; t < 3; t++) begin
      x = random_pixels();
      zr = fdct_ref(x);
      send_block(DCT_FORWARD, 1'b1, x, 0);
      get_block(y);
      for (int i = 0; i < 64; i++)
        check_close("fdct+quant", y[i], zr[i] / real'(jpeg_q(i / 8, i % 8)), 1.0);
      n_fwd++; n_quant++;
    end

    // 4. inverse of integer coefficients (round trip to pixels)
    for (int t = 0; t < 3; t++) begin
      x = random_pixels();
      zr = fdct_ref(x);
      for (int i = 0; i < 64; i++) zq[i] = int'(zr[i]);
      xr = idct_ref(zq);
      send_block(DCT_INVERSE, 1'b0, zq, 0);
      get_block(y);
      for (int i = 0; i < 64; i++) check_close("idct", y[i], xr[i], 1.0);
      for (int i = 0; i < 64; i++) check_close("round trip", y[i], real'(x[i]), 2.0);
      n_inv++;
    end

    // 5. inverse with de-quantisation
    for (int t = 0; t < 3; t++) begin
      x = random_pixels();
      zr = fdct_ref(x);
      for (int i = 0; i < 64; i++) zq[i] = int'(zr[i] / real'(jpeg_q(i / 8, i % 8)));
      for (int i = 0; i < 64; i++) y[i] = zq[i] * jpeg_q(i / 8, i % 8);
      xr = idct_ref(y);
      send_block(DCT_INVERSE, 1'b1, zq, 0);
      get_block(y);
      for (int i = 0; i < 64; i++) check_close("idct+dequant", y[i], xr[i], 1.0);
      n_inv++; n_dequant++;
    end

    // 6. two blocks back to back, in_valid held high throughout:
    // the requests during the busy phases must be ignored
    begin
      iblk_t x2;
      rblk_t zr2;
      x  = random_pixels();
      x2 = random_pixels();
      zr  = fdct_ref(x);
      zr2 = fdct_ref(x2);
      fork
        begin
          send_block(DCT_FORWARD, 1'b0, x, 0);
          in_valid <= 1'b1;   // keep requesting while busy
          send_block(DCT_FORWARD, 1'b0, x2, 0);
        end
      join
      get_block(y);
      for (int i = 0; i < 64; i++) check_close("b2b 1", y[i], zr[i], 1.0);
      get_block(y);
      for (int i = 0; i < 64; i++) check_close("b2b 2", y[i], zr2[i], 1.0);
      checks++;
      if (last_in_cycles[$] - last_in_cycles[$-1] != 145) begin
        failures++;
        $display("FAIL block period %0d", last_in_cycles[$] - last_in_cycles[$-1]);
      end
      n_b2b++; n_fwd += 2;
    end

    // every mechanism must have happened
    begin
      int cnt [8];
      string names [8];
      cnt   = '{n_fwd, n_inv, n_quant, n_dequant, n_flat, n_b2b, n_ignored, n_gap};
      names = '{"forward", "inverse", "quantise", "de-quantise", "flat block",
                "back-to-back", "ignored busy request", "input gap"};
      for (int i = 0; i < 8; i++) begin
        $display("mechanism %-22s happened %0d times", names[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) failures++;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
