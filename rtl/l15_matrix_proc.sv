// l15_matrix_proc -- all per-projection processing of one trigger matrix.
//
// One column of the 2M/1M block diagrams for a single projection: the
// sub-matrix determination (first and last fired rows) feeds, in parallel,
// the NEAR check, the COEF column search and spans, and the DIS distances.
// The result is gathered in an l15_pkg::proj_q_t record.  The top uses one
// instance for X and one for Z in every mode; the 1M differences (orthogonal
// results set inactive or zero) are applied where the results are used.
// Purely combinational.
module l15_matrix_proc #(
  parameter int unsigned N_ROWS = l15_pkg::N_ROWS,
  parameter int unsigned N_COLS = l15_pkg::N_COLS
) (
  input  logic [N_ROWS-1:0][N_COLS-1:0] mat,
  input  logic                          from_right,  // fired panel next to column N_COLS
  input  l15_pkg::quant_t               n_cols,      // NEAR column count
  output l15_pkg::proj_q_t              q
);
  import l15_pkg::*;

  logic [N_ROWS-1:0] row_fired;
  logic              any_hit, near_hit;
  quant_t            i_fr, i_lr, j_fc, j_lc, d_w, d_z, dis_fv, dis_lv;

  l15_submatrix #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_sub (
    .mat, .row_fired, .any_hit, .i_fr, .i_lr);

  l15_near #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_near (
    .mat, .from_right, .n_cols, .near_hit);

  l15_coef_calc #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_coef (
    .mat, .from_right, .i_fr, .i_lr, .j_fc, .j_lc, .d_w, .d_z);

  l15_dis_calc #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_dis (
    .mat, .from_right, .i_fr, .i_lr, .dis_fv, .dis_lv);

  always_comb begin
    q.any_hit = any_hit;
    q.i_fr    = i_fr;
    q.i_lr    = i_lr;
    q.near_hit = near_hit;
    q.d_w     = d_w;
    q.d_z     = d_z;
    q.dis_fv  = dis_fv;
    q.dis_lv  = dis_lv;
  end

endmodule
