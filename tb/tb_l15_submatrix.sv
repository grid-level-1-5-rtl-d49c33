// tb_l15_submatrix -- self-checking test of the sub-matrix determination.
// Random and hand-made matrices; i_fr, i_lr, any_hit and the row ORs are
// compared with the reference model.
module tb_l15_submatrix;
  import l15_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  mat_t        mat;
  logic [11:0] row_fired;
  logic        any_hit;
  logic [3:0]  i_fr, i_lr;
  int checks = 0, failures = 0;

  l15_submatrix dut (.mat, .row_fired, .any_hit, .i_fr, .i_lr);

  task automatic check_one(mat_t m);
    ref_q_t r;
    mat = m;
    #1;
    r = ref_proj(m, 1'b0, 0);
    checks++;
    if (any_hit !== r.any || int'(i_fr) != r.ifr || int'(i_lr) != r.ilr) begin
      failures++;
      $display("FAIL any=%0d/%0d ifr=%0d/%0d ilr=%0d/%0d", any_hit, r.any, i_fr, r.ifr, i_lr, r.ilr);
    end
    for (int i = 0; i < NR; i++) begin
      checks++;
      if (row_fired[i] !== (m[i] != '0)) failures++;
    end
  endtask

  initial begin
    mat_t m;
    m = '0; check_one(m);
    m = '0; m[0][0] = 1; check_one(m);
    m = '0; m[11][11] = 1; check_one(m);
    m = '0; m[3][5] = 1; m[9][0] = 1; check_one(m);
    repeat (3000) check_one(rand_mat());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
