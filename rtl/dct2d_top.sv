// dct2d_top: 8x8 2-D DCT processor with forward (encoder) and inverse
// (decoder) transform and JPEG quantisation.
//
// A block enters as 8 rows of 8 signed 16-bit samples (din[0..7] = one row,
// in_valid/in_ready handshake), is transformed by row-column decomposition
// on eight multiply-accumulate lanes built on the enhanced ALU (carry
// look-ahead adders, carry-save fast multiplier), and leaves as 8 rows on
// dout[0..7] with out_valid high for 8 consecutive cycles (no back-pressure).
//   dir = DCT_FORWARD: Z = M X M^T, then, if quant_en, each coefficient is
//                      divided by its JPEG luminance table entry (rounded).
//   dir = DCT_INVERSE: if quant_en, each incoming coefficient is first
//                      multiplied by its table entry; then X = M^T Z M.
// M is the orthonormal 8-point DCT-II matrix, so the forward DC output is
// 8 x the block mean. dir and quant_en are sampled with the first row of a
// block and held for that block. Timing (dct_controller): 8 load cycles,
// 64-cycle row pass, 64-cycle column pass, one drain cycle, 8 output cycles;
// the first output row follows the last input row by 130 cycles.
//
// From the source design: 8x8 blocks, 16-bit arithmetic, FDCT and IDCT in
// one processor, quantisation and de-quantisation with the JPEG table, an
// ALU of CLA adder/subtractor and fast multiplier, a row of eight inputs and
// eight outputs per transfer, the names InBlock/Din/Dout. This design's own
// choices: matrix-product (not FFT-based) evaluation of the same transform,
// the lane/phase architecture, fixed-point formats and the handshake.
module dct2d_top
  import dct_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  dct_dir_e dir,
  input  logic     quant_en,
  input  logic     in_valid,
  output logic     in_ready,
  input  sample_t  din  [N],
  output logic     out_valid,
  output sample_t  dout [N],
  output logic     block_done
);
  // ---------------- control
  logic load_we, lane_en, lane_clear, in_col_pass, wb_valid, wb_is_col;
  idx_t load_row, term_n, line_idx, wb_idx, out_row;

  dct_controller u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load_we, .load_row,
    .lane_en, .lane_clear, .term_n, .line_idx, .in_col_pass,
    .wb_valid, .wb_is_col, .wb_idx, .out_valid, .out_row, .block_done
  );

  // per-block mode, taken with the first row
  dct_dir_e dir_q;
  logic     quant_q;
  dct_dir_e dir_eff;
  logic     quant_eff;
  logic     first_row;

  assign first_row = load_we && (load_row == '0);
  assign dir_eff   = first_row ? dir : dir_q;
  assign quant_eff = first_row ? quant_en : quant_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir_q   <= DCT_FORWARD;
      quant_q <= 1'b0;
    end else if (first_row) begin
      dir_q   <= dir;
      quant_q <= quant_en;
    end
  end

  // ---------------- lanes
  sample_t coef [N];
  sample_t term;
  sample_t lane_y [N];
  sample_t a_elem, b_elem;
  sample_t a_line [N];

  dct_coef_rom u_rom (.dir(dir_q), .n(term_n), .coef(coef));

  assign term = in_col_pass ? b_elem : a_elem;

  for (genvar k = 0; k < N; k++) begin : g_lane
    dct_mac_lane u_lane (
      .clk, .rst_n,
      .en      (lane_en),
      .clear   (lane_clear),
      .col_pass(wb_is_col),
      .x       (term),
      .c       (coef[k]),
      .acc     (),
      .y       (lane_y[k])
    );
  end

  // ---------------- quantisers, shared by the input (de-quantise) and
  // the column write-back (quantise)
  sample_t q_in [N], q_out [N];
  idx_t    q_row [N], q_col [N];

  for (genvar k = 0; k < N; k++) begin : g_quant
    always_comb begin
      if (in_ready) begin
        q_in[k]  = din[k];
        q_row[k] = load_row;
        q_col[k] = idx_t'(k);
      end else begin
        q_in[k]  = lane_y[k];
        q_row[k] = idx_t'(k);
        q_col[k] = wb_idx;
      end
    end
    quantizer u_q (
      .dequant(in_ready),
      .row    (q_row[k]),
      .col    (q_col[k]),
      .value  (q_in[k]),
      .result (q_out[k])
    );
  end

  // ---------------- block stores: A (InBlock, input and final result), B (intermediate)
  sample_t a_wdata [N];
  idx_t    a_rd_row, a_rd_col;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      if (in_ready)
        a_wdata[k] = (quant_eff && dir_eff == DCT_INVERSE) ? q_out[k] : din[k];
      else
        a_wdata[k] = (quant_q && dir_q == DCT_FORWARD) ? q_out[k] : lane_y[k];
    end
    a_rd_row = out_valid ? out_row : line_idx;
    a_rd_col = term_n;
  end

  block_buffer u_in_block (
    .clk, .rst_n,
    .wr_row_en(load_we),
    .wr_col_en(wb_valid && wb_is_col),
    .wr_idx   (load_we ? load_row : wb_idx),
    .wr_data  (a_wdata),
    .rd_row   (a_rd_row),
    .rd_col   (a_rd_col),
    .rd_elem  (a_elem),
    .rd_line  (a_line)
  );

  block_buffer u_mid_block (
    .clk, .rst_n,
    .wr_row_en(wb_valid && !wb_is_col),
    .wr_col_en(1'b0),
    .wr_idx   (wb_idx),
    .wr_data  (lane_y),
    .rd_row   (term_n),
    .rd_col   (line_idx),
    .rd_elem  (b_elem),
    .rd_line  ()
  );

  assign dout = a_line;
endmodule
