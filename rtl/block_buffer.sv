// block_buffer: one 8x8 block of 16-bit samples (the processor's block store).
//
// Written a whole row at a time (wr_row_en: row wr_idx <- wr_data[0..7],
// used when a row of 8 input samples arrives or a row-pass result is ready)
// or a whole column at a time (wr_col_en: column wr_idx <- wr_data[0..7],
// used by the column pass). A row write wins if both are asserted.
// Two read views: a single element (rd_row, rd_col) broadcast to the MAC
// lanes, and a whole row (rd_row) for the block output. Reads are
// combinational, writes take effect at the rising clock edge. The contents
// are cleared by reset. The source shows the block store only by name; its
// ports are this implementation's choice.
module block_buffer
  import dct_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr_row_en,
  input  logic    wr_col_en,
  input  idx_t    wr_idx,
  input  sample_t wr_data [N],
  input  idx_t    rd_row,
  input  idx_t    rd_col,
  output sample_t rd_elem,
  output sample_t rd_line [N]
);
  sample_t mem [N][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          mem[r][c] <= '0;
    end else if (wr_row_en) begin
      for (int c = 0; c < N; c++)
        mem[wr_idx][c] <= wr_data[c];
    end else if (wr_col_en) begin
      for (int r = 0; r < N; r++)
        mem[r][wr_idx] <= wr_data[r];
    end
  end

  assign rd_elem = mem[rd_row][rd_col];

  always_comb
    for (int c = 0; c < N; c++)
      rd_line[c] = mem[rd_row][c];
endmodule
