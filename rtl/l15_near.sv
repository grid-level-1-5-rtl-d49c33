// l15_near -- NEAR algorithm for one projection.
//
// Sets near_hit when a TAA1 fired in one of the n_cols columns closest to the
// fired AC lateral side.  from_right = 0 means the panel is next to column 1
// (AC side 2 for X, side 1 for Z); from_right = 1 means it is next to column
// N_COLS (side 4 for X, side 3 for Z).  Every fired TAA1 lies in the
// sub-matrix, so the column ORs of the whole matrix are used.  n_cols = 0
// never fires and values above N_COLS cover all columns.  The TC enable and
// the inactive orthogonal NEAR of 1M logic are applied by the caller.
// Purely combinational.
module l15_near #(
  parameter int unsigned N_ROWS = l15_pkg::N_ROWS,
  parameter int unsigned N_COLS = l15_pkg::N_COLS
) (
  input  logic [N_ROWS-1:0][N_COLS-1:0] mat,
  input  logic                          from_right,
  input  l15_pkg::quant_t               n_cols,      // n_X or n_Z
  output logic                          near_hit
);
  import l15_pkg::*;

  logic [N_COLS-1:0] col_fired;   // OR of each column, column 1 at bit 0

  always_comb begin
    col_fired = '0;
    for (int i = 0; i < N_ROWS; i++) col_fired |= mat[i];
    near_hit = 1'b0;
    for (int k = 0; k < N_COLS; k++) begin
      // k = distance of the column from the fired panel, 0 = adjacent
      if (k < int'(n_cols) && col_fired[from_right ? N_COLS-1-k : k]) near_hit = 1'b1;
    end
  end

endmodule
