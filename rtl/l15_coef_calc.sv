// l15_coef_calc -- COEF quantities of one projection.
//
// Finds j_fc and j_lc, the columns holding the fired TAA1 closest to and
// farthest from the fired AC lateral side, and returns the spans
//   d_w = |j_lc - j_fc|   (columns)      d_z = |i_lr - i_fr|   (rows)
// as 4-bit words, the assignment of W to columns and Z to rows following the
// block diagrams of the specification.  j_fc and j_lc are counted from the
// fired panel, 1 = adjacent column; an empty matrix gives all zeros.
// Purely combinational; i_fr and i_lr come from l15_submatrix.
module l15_coef_calc #(
  parameter int unsigned N_ROWS = l15_pkg::N_ROWS,
  parameter int unsigned N_COLS = l15_pkg::N_COLS
) (
  input  logic [N_ROWS-1:0][N_COLS-1:0] mat,
  input  logic                          from_right,
  input  l15_pkg::quant_t               i_fr,
  input  l15_pkg::quant_t               i_lr,
  output l15_pkg::quant_t               j_fc,   // closest column, 1-based from the panel
  output l15_pkg::quant_t               j_lc,   // farthest column, 1-based from the panel
  output l15_pkg::quant_t               d_w,
  output l15_pkg::quant_t               d_z
);
  import l15_pkg::*;

  logic [N_COLS-1:0] col_fired;   // bit k = column at distance k from the panel

  always_comb begin
    col_fired = '0;
    for (int i = 0; i < N_ROWS; i++)
      for (int k = 0; k < N_COLS; k++)
        if (mat[i][from_right ? N_COLS-1-k : k]) col_fired[k] = 1'b1;
    j_fc = '0;
    j_lc = '0;
    for (int k = N_COLS-1; k >= 0; k--)
      if (col_fired[k]) j_fc = quant_t'(k + 1);
    for (int k = 0; k < N_COLS; k++)
      if (col_fired[k]) j_lc = quant_t'(k + 1);
    d_w = j_lc - j_fc;                               // j_lc >= j_fc by construction
    d_z = (i_lr >= i_fr) ? i_lr - i_fr : i_fr - i_lr;
  end

endmodule
