// tb_l15_coef_calc -- self-checking test of the COEF quantities: column and
// row spans of random and hand-made matrices, both panel positions.  The row
// indices are taken from the reference model, not from the design.
module tb_l15_coef_calc;
  import l15_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  mat_t       mat;
  logic       from_right;
  logic [3:0] i_fr, i_lr, j_fc, j_lc, d_w, d_z;
  int checks = 0, failures = 0;

  l15_coef_calc dut (.mat, .from_right, .i_fr, .i_lr, .j_fc, .j_lc, .d_w, .d_z);

  task automatic check_one(mat_t m, bit fr);
    ref_q_t r;
    r = ref_proj(m, fr, 0);
    mat = m; from_right = fr; i_fr = 4'(r.ifr); i_lr = 4'(r.ilr);
    #1;
    checks++;
    if (int'(d_w) != r.dw || int'(d_z) != r.dz) begin
      failures++;
      $display("FAIL dw=%0d/%0d dz=%0d/%0d fr=%0d", d_w, r.dw, d_z, r.dz, fr);
    end
  endtask

  initial begin
    mat_t m;
    m = '0; check_one(m, 0);
    m = '0; m[2][0] = 1; m[7][11] = 1; check_one(m, 0); check_one(m, 1);   // dW = 11, dZ = 5
    m = '0; m[0][4] = 1; m[11][4] = 1; check_one(m, 1);                    // dW = 0, dZ = 11
    repeat (4000) check_one(rand_mat(), 1'($urandom_range(0, 1)));
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
