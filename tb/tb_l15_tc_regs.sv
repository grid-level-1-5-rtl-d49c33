// tb_l15_tc_regs -- self-checking test of the TC register block: reset
// values, configuration writes through the packed field layout, and routing
// of LUT writes to exactly one table.
module tb_l15_tc_regs;
  import l15_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n = 1'b0, tc_we = 1'b0;
  tc_target_t  tc_target = TC_CFG;
  logic [15:0] tc_addr = '0, tc_wdata = '0;
  l15_cfg_t    cfg;
  logic        coef_we, dis_we, l15_we, lut_wdata;
  logic [15:0] lut_waddr;
  int checks = 0, failures = 0;

  l15_tc_regs dut (.clk, .rst_n, .tc_we, .tc_target, .tc_addr, .tc_wdata,
                   .cfg, .coef_we, .dis_we, .l15_we, .lut_waddr, .lut_wdata);

  task automatic expect_cfg(int nx, int nz, bit nxe, bit nze, bit ce, bit de, bit of);
    checks++;
    if (int'(cfg.n_x) != nx || int'(cfg.n_z) != nz || cfg.near_x_en != nxe ||
        cfg.near_z_en != nze || cfg.coef_en != ce || cfg.dis_en != de || cfg.other_fef != of) begin
      failures++;
      $display("FAIL cfg=%h", cfg);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_cfg(2, 2, 1, 1, 1, 1, 1);
    repeat (200) begin
      logic [15:0] w;
      w = 16'($urandom);
      @(negedge clk); tc_we = 1'b1; tc_target = TC_CFG; tc_wdata = w;
      checks++;
      if (coef_we || dis_we || l15_we) failures++;
      @(negedge clk); tc_we = 1'b0;
      expect_cfg(int'(w[3:0]), int'(w[7:4]), w[8], w[9], w[10], w[11], w[12]);
      // a LUT write must not touch the configuration
      tc_we = 1'b1; tc_target = tc_target_t'($urandom_range(1, 3));
      tc_addr = 16'($urandom); tc_wdata = ~w;
      #1;
      checks++;
      if (coef_we != (tc_target == TC_COEF_LUT) || dis_we != (tc_target == TC_DIS_LUT) ||
          l15_we != (tc_target == TC_L15_LUT) || lut_waddr != tc_addr || lut_wdata != ~w[0])
        failures++;
      @(negedge clk); tc_we = 1'b0;
      expect_cfg(int'(w[3:0]), int'(w[7:4]), w[8], w[9], w[10], w[11], w[12]);
    end
    rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    expect_cfg(2, 2, 1, 1, 1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
