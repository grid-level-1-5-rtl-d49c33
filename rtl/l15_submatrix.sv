// l15_submatrix -- sub-matrix determination for one projection.
//
// The sub-matrix of a trigger matrix is the band of rows between the first
// and the last row holding a fired TAA1 (the first and the last fired ST
// views).  Each row is ORed; the lowest and highest rows whose OR is set give
// i_fr and i_lr.  Indices are 1-based like the matrix elements X_{1,1} ..
// X_{12,12}; an empty matrix gives any_hit = 0 and both indices 0 (the empty
// case is this design's choice).  Purely combinational.
module l15_submatrix #(
  parameter int unsigned N_ROWS = l15_pkg::N_ROWS,
  parameter int unsigned N_COLS = l15_pkg::N_COLS
) (
  input  logic [N_ROWS-1:0][N_COLS-1:0] mat,        // [row i-1][column j-1]
  output logic [N_ROWS-1:0]             row_fired,  // OR of every row
  output logic                          any_hit,
  output l15_pkg::quant_t               i_fr,       // first fired row, 1-based
  output l15_pkg::quant_t               i_lr        // last fired row, 1-based
);
  import l15_pkg::*;

  always_comb begin
    for (int i = 0; i < N_ROWS; i++) row_fired[i] = |mat[i];
    any_hit = |row_fired;
    i_fr = '0;
    i_lr = '0;
    // Scan from the last row down so the first fired row is written last.
    for (int i = N_ROWS-1; i >= 0; i--)
      if (row_fired[i]) i_fr = quant_t'(i + 1);
    for (int i = 0; i < N_ROWS; i++)
      if (row_fired[i]) i_lr = quant_t'(i + 1);
  end

endmodule
