// tb_l15_near -- self-checking test of the NEAR algorithm for every n from
// 0 to 15 and both panel positions, against the reference model.
module tb_l15_near;
  import l15_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  mat_t       mat;
  logic       from_right;
  logic [3:0] n_cols;
  logic       near_hit;
  int checks = 0, failures = 0, fired = 0;

  l15_near dut (.mat, .from_right, .n_cols, .near_hit);

  task automatic check_one(mat_t m, bit fr, int n);
    ref_q_t r;
    mat = m; from_right = fr; n_cols = 4'(n);
    #1;
    r = ref_proj(m, fr, n);
    checks++;
    if (near_hit) fired++;
    if (int'(near_hit) != r.near_hit) begin
      failures++;
      $display("FAIL near=%0d exp=%0d n=%0d fr=%0d", near_hit, r.near_hit, n, fr);
    end
  endtask

  initial begin
    mat_t m;
    // one chip in each column, each n, each side
    for (int j = 0; j < NC; j++)
      for (int n = 0; n < 16; n++)
        for (int fr = 0; fr < 2; fr++) begin
          m = '0; m[$urandom_range(0, NR-1)][j] = 1'b1;
          check_one(m, fr[0], n);
        end
    repeat (3000) check_one(rand_mat(), 1'($urandom_range(0, 1)), $urandom_range(0, 15));
    checks++;
    if (fired == 0) failures++;
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
