// quantizer: JPEG quantisation (encoder) or de-quantisation (decoder) of one
// DCT coefficient by the table entry at (row, col) of the 8x8 block.
//
//   quantise:    q = sign(v) * floor((|v| * R + 2^15) / 2^16), R = round(2^16/Q)
//                i.e. v/Q rounded to nearest, computed by multiplication
//   de-quantise: v' = q * Q, saturated to 16 bits
// Q is the JPEG luminance table (dct_pkg). Both operations share one
// 18-bit fast multiplier (18 bits so that |v| = 32768 fits as a positive
// operand). Purely combinational. Quantisation and de-quantisation by the
// JPEG table follow the source design; the reciprocal method, the table
// choice and the rounding are this implementation's.
module quantizer
  import dct_pkg::*;
(
  input  logic    dequant,  // 0: quantise, 1: de-quantise
  input  idx_t    row,
  input  idx_t    col,
  input  sample_t value,
  output sample_t result
);
  localparam int MW = DATA_W + 2;

  typedef logic [15:0] table_t [N*N];

  function automatic table_t build_table(bit recip);
    table_t t;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        t[r*N + c] = 16'(recip ? jpeg_recip(r, c) : jpeg_q(r, c));
    return t;
  endfunction

  localparam table_t QTAB = build_table(1'b0);
  localparam table_t RTAB = build_table(1'b1);

  logic                  neg;
  logic [DATA_W:0]       mag;
  logic signed [MW-1:0]  op_a, op_b;
  logic signed [2*MW-1:0] prod;

  always_comb begin
    neg  = value[DATA_W-1];
    mag  = neg ? (DATA_W+1)'(-(DATA_W+1)'(value)) : (DATA_W+1)'(value);
    op_a = dequant ? MW'(value) : MW'(signed'({1'b0, mag}));
    op_b = MW'(signed'({1'b0, dequant ? QTAB[{row, col}] : RTAB[{row, col}]}));
  end

  fast_multiplier #(.WIDTH(MW)) u_mul (.a(op_a), .b(op_b), .p(prod));

  localparam logic signed [2*MW-1:0] MAXV = (2*MW)'(2**(DATA_W-1) - 1);
  localparam logic signed [2*MW-1:0] MINV = -(2*MW)'(2**(DATA_W-1));

  always_comb begin
    logic [2*MW-1:0] qmag;
    qmag = (prod + (2*MW)'(1 << (RECIP_FRAC - 1))) >> RECIP_FRAC;
    if (dequant) begin
      if (prod > MAXV)      result = sample_t'(MAXV);
      else if (prod < MINV) result = sample_t'(MINV);
      else                  result = sample_t'(prod);
    end else begin
      result = neg ? -sample_t'(qmag) : sample_t'(qmag);
    end
  end
endmodule
