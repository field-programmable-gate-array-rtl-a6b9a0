// tb_block_buffer: 8x8 block store. Checks reset to zero, row writes,
// column writes (which must overwrite one element of every row), the
// element read port and the row read port against a model array.
module tb_block_buffer;
  import dct_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n = 1'b0;
  logic    wr_row_en = 1'b0, wr_col_en = 1'b0;
  idx_t    wr_idx = '0, rd_row = '0, rd_col = '0;
  sample_t wr_data [N];
  sample_t rd_elem;
  sample_t rd_line [N];
  int      model [N][N];
  int checks = 0, failures = 0;

  block_buffer dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        rd_row = idx_t'(r); rd_col = idx_t'(c);
        #1;
        checks++;
        if (int'(rd_elem) != model[r][c]) begin
          failures++;
          $display("FAIL elem %0d,%0d = %0d want %0d", r, c, rd_elem, model[r][c]);
        end
        checks++;
        if (int'(rd_line[c]) != model[r][c]) failures++;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) wr_data[i] = '0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) model[r][c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_all();
    for (int round = 0; round < 20; round++) begin
      logic col;
      int   idx;
      col = 1'($urandom);
      idx = int'($urandom_range(7, 0));
      for (int i = 0; i < N; i++) wr_data[i] = sample_t'($urandom);
      @(negedge clk);
      wr_idx = idx_t'(idx);
      wr_row_en = !col;
      wr_col_en = col;
      @(posedge clk);
      #1;
      wr_row_en = 1'b0;
      wr_col_en = 1'b0;
      for (int i = 0; i < N; i++)
        if (col) model[i][idx] = int'(wr_data[i]);
        else     model[idx][i] = int'(wr_data[i]);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
