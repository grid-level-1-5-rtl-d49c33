// tb_l15_coef_trigger -- self-checking test of the COEF trigger: loads a
// pattern into the whole COEF LUT, then drives random quantities in 2M and
// both 1M modes, with the stage enabled and disabled, and checks coef one
// clock later against the pattern at {dWx, dZx, dWz, dZz} with the unused
// pair zeroed.
module tb_l15_coef_trigger;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n = 1'b0, in_valid = 1'b0, use_x = 1'b0, use_z = 1'b0, en = 1'b1;
  logic [3:0]  d_w_x = '0, d_z_x = '0, d_w_z = '0, d_z_z = '0;
  logic        lut_we = 1'b0, lut_wdata = 1'b0, coef;
  logic [15:0] lut_waddr = '0;
  int checks = 0, failures = 0, ones = 0;

  l15_coef_trigger dut (.clk, .rst_n, .in_valid, .use_x, .use_z, .en,
                        .d_w_x, .d_z_x, .d_w_z, .d_z_z,
                        .lut_we, .lut_waddr, .lut_wdata, .coef);

  // pseudo-random table; bit 19 of the product depends on all 16 address bits
  function automatic bit pat(int a);
    int unsigned h = int'(a) * 32'h9E37_79B1;
    return h[19];
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); lut_we = 1'b1; lut_waddr = 16'(a); lut_wdata = pat(a);
    end
    @(negedge clk); lut_we = 1'b0;
    repeat (5000) begin
      int mode;
      bit exp;
      logic [15:0] a;
      mode = $urandom_range(0, 2);
      use_x = mode != 2; use_z = mode != 1;
      en = $urandom_range(0, 7) != 0;
      d_w_x = 4'($urandom_range(0, 11)); d_z_x = 4'($urandom_range(0, 11));
      d_w_z = 4'($urandom_range(0, 11)); d_z_z = 4'($urandom_range(0, 11));
      in_valid = 1'b1;
      a = {use_x ? d_w_x : 4'd0, use_x ? d_z_x : 4'd0, use_z ? d_w_z : 4'd0, use_z ? d_z_z : 4'd0};
      exp = en && pat(int'(a));
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (coef) ones++;
      if (coef !== exp) begin
        failures++;
        $display("FAIL a=%h en=%0d coef=%0d exp=%0d", a, en, coef, exp);
      end
    end
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
