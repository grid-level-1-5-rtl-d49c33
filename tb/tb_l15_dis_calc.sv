// tb_l15_dis_calc -- self-checking test of the DIS distances on the first and
// last fired views, both panel positions, against the reference model.
module tb_l15_dis_calc;
  import l15_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  mat_t       mat;
  logic       from_right;
  logic [3:0] i_fr, i_lr, dis_fv, dis_lv;
  int checks = 0, failures = 0;

  l15_dis_calc dut (.mat, .from_right, .i_fr, .i_lr, .dis_fv, .dis_lv);

  task automatic check_one(mat_t m, bit fr);
    ref_q_t r;
    r = ref_proj(m, fr, 0);
    mat = m; from_right = fr; i_fr = 4'(r.ifr); i_lr = 4'(r.ilr);
    #1;
    checks++;
    if (int'(dis_fv) != r.dfv || int'(dis_lv) != r.dlv) begin
      failures++;
      $display("FAIL fv=%0d/%0d lv=%0d/%0d fr=%0d", dis_fv, r.dfv, dis_lv, r.dlv, fr);
    end
  endtask

  initial begin
    mat_t m;
    m = '0; check_one(m, 0);
    m = '0; m[1][0] = 1; m[1][9] = 1; m[10][3] = 1; check_one(m, 0); check_one(m, 1);  // 0,3 / 2,8
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
