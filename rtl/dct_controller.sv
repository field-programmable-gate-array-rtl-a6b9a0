// dct_controller: sequencer of the 8x8 2-D DCT processor.
//
// One block goes through five phases (state_e):
//   LOAD  (8 accepted rows) in_ready is high; each cycle with in_valid a row
//         of 8 samples is written into block store A (row load_row).
//   ROW   (64 cycles) row pass: for r = 0..7, n = 0..7 the lanes take element
//         A[r][n]; a lane result is written back as row r of store B in the
//         cycle after its last term.
//   COL   (64 cycles) column pass: for j = 0..7, n = 0..7 the lanes take
//         B[n][j]; the results are written back as column j of store A.
//   DRAIN (1 cycle) write-back of the last column.
//   OUT   (8 cycles) out_valid is high and row out_row of A is presented.
// Hence one block takes 8 + 64 + 64 + 1 + 8 = 145 cycles when rows arrive
// back to back, and the first output row appears 130 cycles after the last
// input row was accepted. Write-backs are one cycle behind the terms
// (wb_valid, wb_is_col, wb_idx are registered), which lets the next inner
// product start while the previous one is written. The source gives no
// controller; the phase structure and its timing are this design's own.
module dct_controller
  import dct_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic load_we,      // write row load_row of A with the incoming row
  output idx_t load_row,
  output logic lane_en,      // MAC lanes take a term this cycle
  output logic lane_clear,   // ... and it is the first term of a new sum
  output idx_t term_n,       // inner-product index n (selects cosine entries)
  output idx_t line_idx,     // r in the row pass, j in the column pass
  output logic in_col_pass,  // terms come from B (column pass)
  output logic wb_valid,     // lane results are complete this cycle
  output logic wb_is_col,    // ... and belong to the column pass
  output idx_t wb_idx,       // ... row (row pass) or column (column pass) index
  output logic out_valid,
  output idx_t out_row,
  output logic block_done    // last output row of a block this cycle
);
  typedef enum logic [2:0] {S_LOAD, S_ROW, S_COL, S_DRAIN, S_OUT} state_e;

  state_e     state;
  logic [5:0] cnt;   // row/column pass term counter, also load and output row counter

  assign in_ready    = (state == S_LOAD);
  assign load_we     = in_ready && in_valid;
  assign load_row    = cnt[2:0];
  assign lane_en     = (state == S_ROW) || (state == S_COL);
  assign term_n      = cnt[2:0];
  assign line_idx    = cnt[5:3];
  assign lane_clear  = lane_en && (cnt[2:0] == '0);
  assign in_col_pass = (state == S_COL);
  assign out_valid   = (state == S_OUT);
  assign out_row     = cnt[2:0];
  assign block_done  = out_valid && (cnt[2:0] == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      wb_valid  <= 1'b0;
      wb_is_col <= 1'b0;
      wb_idx    <= '0;
    end else begin
      wb_valid  <= lane_en && (cnt[2:0] == 3'd7);
      wb_is_col <= (state == S_COL);
      wb_idx    <= cnt[5:3];
      unique case (state)
        S_LOAD: if (load_we) begin
          if (cnt[2:0] == 3'd7) begin
            state <= S_ROW;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 6'd1;
          end
        end
        S_ROW: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_COL;
        end
        S_COL: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_DRAIN;
        end
        S_DRAIN: begin
          state <= S_OUT;
          cnt   <= '0;
        end
        S_OUT: begin
          if (cnt[2:0] == 3'd7) begin
            state <= S_LOAD;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 6'd1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // a row or column write-back never coincides with a load
  assert property (@(posedge clk) disable iff (!rst_n) !(wb_valid && load_we));
  // the lanes only work in the two passes
  assert property (@(posedge clk) disable iff (!rst_n) lane_en |-> !in_ready);
endmodule
