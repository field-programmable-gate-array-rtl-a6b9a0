// dct_pkg: types and constants shared by the 8x8 2-D DCT processor.
//
// Holds the sample type (16-bit signed, the word length used for all
// arithmetic), the ALU operation codes, the transform direction, the
// fixed-point formats and two constant tables:
//   * the orthonormal 8-point DCT-II matrix M[k][n] = a(k)*cos((2n+1)k*pi/16),
//     a(0) = 1/sqrt(8), a(k>0) = 1/2, stored as Q2.14 integers
//     (value * 2^14, rounded to nearest). The eight distinct magnitudes are
//     0.5*cos(j*pi/16)*2^14 for j = 0..7; every entry is one of them with a sign.
//   * the JPEG luminance quantisation table (ITU-T T.81 Annex K, table K.1)
//     and its rounded reciprocals R = round(2^16 / Q), so that quantisation
//     becomes a multiplication.
// The 16-bit word length and the 8x8 block come from the source design; the
// Q-formats, the table choice (luminance) and the reciprocal quantiser are
// this implementation's own choices.
package dct_pkg;

  localparam int N         = 8;   // block edge: 8x8 pixel blocks
  localparam int DATA_W    = 16;  // word length of all arithmetic operands
  localparam int COEF_FRAC = 14;  // fractional bits of the cosine matrix
  localparam int MID_FRAC  = 2;   // fractional bits kept between row and column pass
  localparam int ACC_W     = 2 * DATA_W;  // product / accumulator width
  localparam int RECIP_FRAC = 16; // fractional bits of the quantiser reciprocals

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic [$clog2(N)-1:0]     idx_t;

  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_MUL = 2'd2
  } alu_op_e;

  typedef enum logic {
    DCT_FORWARD = 1'b0,   // FDCT (encoder): pixels in, coefficients out
    DCT_INVERSE = 1'b1    // IDCT (decoder): coefficients in, pixels out
  } dct_dir_e;

  // 0.5*cos(j*pi/16) in Q14, j = 0..8
  localparam int HALF_COS_Q14 [9] = '{8192, 8035, 7568, 6811, 5793, 4551, 3135, 1598, 0};

  // DCT-II matrix entry M[k][n] in Q14
  function automatic int dct_matrix(int k, int n);
    int m;
    if (k == 0) return HALF_COS_Q14[4];          // 1/sqrt(8) = 0.5*cos(pi/4)
    m = ((2 * n + 1) * k) % 32;
    if (m > 16) m = 32 - m;                       // cos(2pi - x) = cos(x)
    if (m > 8)  return -HALF_COS_Q14[16 - m];     // cos(pi - x) = -cos(x)
    return HALF_COS_Q14[m];
  endfunction

  // JPEG luminance quantisation table, row-major (row = vertical frequency)
  localparam int JPEG_LUMA_Q [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,
    12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,
    14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,
    24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,
    72, 92, 95, 98, 112, 100, 103,  99
  };

  function automatic int jpeg_q(int r, int c);
    return JPEG_LUMA_Q[r * N + c];
  endfunction

  function automatic int jpeg_recip(int r, int c);
    int q;
    q = jpeg_q(r, c);
    return ((1 << RECIP_FRAC) + q / 2) / q;
  endfunction

endpackage
