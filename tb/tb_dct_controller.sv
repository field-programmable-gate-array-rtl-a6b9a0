// tb_dct_controller: phase sequencing of one block and of back-to-back
// blocks. Checks that 8 rows are accepted with load_row 0..7 (gaps in
// in_valid are waited out), that the lanes then run 128 terms with a clear
// every 8th, that 8 row write-backs (indices 0..7) precede 8 column
// write-backs (indices 0..7), that out_valid lasts 8 cycles with out_row
// 0..7 and block_done on the last, and the cycle counts between them.
module tb_dct_controller;
  import dct_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0, in_valid = 1'b0;
  logic in_ready, load_we, lane_en, lane_clear, in_col_pass, wb_valid, wb_is_col;
  logic out_valid, block_done;
  idx_t load_row, term_n, line_idx, wb_idx, out_row;
  int checks = 0, failures = 0;

  dct_controller dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int blk = 0; blk < 3; blk++) begin
      int loads = 0, terms = 0, clears = 0, row_wb = 0, col_wb = 0, outs = 0, cyc = 0;
      int last_load = 0, first_out = 0, done_cyc = 0;
      int gap;
      gap = (blk == 1) ? 2 : 0;
      while (outs < 8) begin
        @(negedge clk);
        in_valid = (loads < 8) && (gap == 0 || (cyc % (gap + 1)) == 0);
        #1;
        if (load_we) begin
          expect_eq("load_row", int'(load_row), loads);
          loads++;
          last_load = cyc;
        end
        if (lane_en) begin
          expect_eq("term_n", int'(term_n), terms % 8);
          expect_eq("clear", int'(lane_clear), int'(terms % 8 == 0));
          expect_eq("pass", int'(in_col_pass), int'(terms >= 64));
          terms++;
        end
        if (wb_valid) begin
          if (!wb_is_col) begin
            expect_eq("row wb idx", int'(wb_idx), row_wb);
            expect_eq("row wb order", col_wb, 0);
            row_wb++;
          end else begin
            expect_eq("col wb idx", int'(wb_idx), col_wb);
            col_wb++;
          end
        end
        if (out_valid) begin
          expect_eq("out_row", int'(out_row), outs);
          if (outs == 0) first_out = cyc;
          expect_eq("block_done", int'(block_done), int'(outs == 7));
          if (block_done) done_cyc = cyc;
          outs++;
        end
        cyc++;
      end
      in_valid = 1'b0;
      expect_eq("loads", loads, 8);
      expect_eq("terms", terms, 128);
      expect_eq("row write-backs", row_wb, 8);
      expect_eq("column write-backs", col_wb, 8);
      expect_eq("latency", first_out - last_load, 130);
      expect_eq("output span", done_cyc - first_out, 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
