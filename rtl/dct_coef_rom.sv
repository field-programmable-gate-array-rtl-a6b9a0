// dct_coef_rom: cosine matrix entries for the 8 MAC lanes.
//
// For inner-product term n it returns, for every lane k, the Q14 entry of the
// orthonormal DCT-II matrix M: M[k][n] for the forward transform and M[n][k]
// (the transpose) for the inverse transform. The table is computed at
// elaboration from dct_pkg::dct_matrix; reading it is combinational.
// The transform is the DCT of the source design's 8x8 blocks; storing it as
// a Q14 matrix (rather than FFT twiddle factors) is this design's choice.
module dct_coef_rom
  import dct_pkg::*;
(
  input  dct_dir_e dir,
  input  idx_t     n,
  output sample_t  coef [N]
);
  typedef sample_t matrix_t [N*N];

  function automatic matrix_t build_matrix();
    matrix_t m;
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++)
        m[k*N + j] = sample_t'(dct_matrix(k, j));
    return m;
  endfunction

  localparam matrix_t M = build_matrix();

  always_comb
    for (int k = 0; k < N; k++)
      coef[k] = (dir == DCT_FORWARD) ? M[k*N + int'(n)] : M[int'(n)*N + k];
endmodule
