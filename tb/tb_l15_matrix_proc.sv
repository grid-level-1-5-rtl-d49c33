// tb_l15_matrix_proc -- self-checking test of one projection's processing:
// every field of the result record against the reference model.
module tb_l15_matrix_proc;
  import l15_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  mat_t              mat;
  logic              from_right;
  logic [3:0]        n_cols;
  l15_pkg::proj_q_t  q;
  int checks = 0, failures = 0;

  l15_matrix_proc dut (.mat, .from_right, .n_cols, .q);

  task automatic check_one(mat_t m, bit fr, int n);
    ref_q_t r;
    r = ref_proj(m, fr, n);
    mat = m; from_right = fr; n_cols = 4'(n);
    #1;
    checks++;
    if (q.any_hit != r.any || int'(q.i_fr) != r.ifr || int'(q.i_lr) != r.ilr ||
        int'(q.near_hit) != r.near_hit || int'(q.d_w) != r.dw || int'(q.d_z) != r.dz ||
        int'(q.dis_fv) != r.dfv || int'(q.dis_lv) != r.dlv) begin
      failures++;
      $display("FAIL ifr=%0d/%0d ilr=%0d/%0d near=%0d/%0d dw=%0d/%0d dz=%0d/%0d fv=%0d/%0d lv=%0d/%0d",
               q.i_fr, r.ifr, q.i_lr, r.ilr, q.near_hit, r.near_hit, q.d_w, r.dw, q.d_z, r.dz,
               q.dis_fv, r.dfv, q.dis_lv, r.dlv);
    end
  endtask

  initial begin
    mat_t m;
    // hand-worked case: panel next to column 1, chips (3,2), (5,4), (8,9)
    m = '0; m[2][1] = 1'b1; m[4][3] = 1'b1; m[7][8] = 1'b1;
    mat = m; from_right = 1'b0; n_cols = 4'd2;
    #1;
    checks++;
    if (q.i_fr != 4'd3 || q.i_lr != 4'd8 || q.d_z != 4'd5 || q.d_w != 4'd7 ||
        q.dis_fv != 4'd1 || q.dis_lv != 4'd8 || q.near_hit != 1'b1) begin
      failures++;
      $display("FAIL worked example");
    end
    n_cols = 4'd1;
    #1;
    checks++;
    if (q.near_hit != 1'b0) failures++;
    repeat (4000) check_one(rand_mat(), 1'($urandom_range(0, 1)), $urandom_range(0, 12));
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
