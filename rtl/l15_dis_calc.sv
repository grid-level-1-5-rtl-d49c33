// l15_dis_calc -- DIS distances of one projection.
//
// On the first fired view (row i_fr) and on the last fired view (row i_lr)
// finds the fired TAA1 closest to the fired AC lateral side and returns its
// distance from the panel as a number of TAA1 chips: the count of chips lying
// between the panel and it, so 0 for the adjacent column and N_COLS-1 for the
// far one (this counting is a choice of this design).  i_fr and i_lr are
// 1-based and come from l15_submatrix; 0 (empty matrix) gives distances 0.
// Purely combinational.
module l15_dis_calc #(
  parameter int unsigned N_ROWS = l15_pkg::N_ROWS,
  parameter int unsigned N_COLS = l15_pkg::N_COLS
) (
  input  logic [N_ROWS-1:0][N_COLS-1:0] mat,
  input  logic                          from_right,
  input  l15_pkg::quant_t               i_fr,
  input  l15_pkg::quant_t               i_lr,
  output l15_pkg::quant_t               dis_fv,
  output l15_pkg::quant_t               dis_lv
);
  import l15_pkg::*;

  logic [N_COLS-1:0] row_f, row_l;   // selected rows, bit k = distance k from the panel

  always_comb begin
    row_f = '0;
    row_l = '0;
    for (int i = 0; i < N_ROWS; i++)
      for (int k = 0; k < N_COLS; k++) begin
        if (int'(i_fr) == i + 1 && mat[i][from_right ? N_COLS-1-k : k]) row_f[k] = 1'b1;
        if (int'(i_lr) == i + 1 && mat[i][from_right ? N_COLS-1-k : k]) row_l[k] = 1'b1;
      end
    dis_fv = '0;
    dis_lv = '0;
    for (int k = N_COLS-1; k >= 0; k--) begin
      if (row_f[k]) dis_fv = quant_t'(k);
      if (row_l[k]) dis_lv = quant_t'(k);
    end
  end

endmodule
