// tb_l15_output_trigger -- self-checking test of the output trigger logic:
// loads the 32-entry Level-1.5 LUT, applies every combination of X-NEAR,
// Z-NEAR, COEF, DIS and the 1M flag and checks the trigger one clock later,
// then reloads the table with its complement and repeats.
module tb_l15_output_trigger;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n = 1'b0, in_valid = 1'b0;
  logic       near_x = 1'b0, near_z = 1'b0, coef = 1'b0, dis = 1'b0, flag_1m = 1'b0;
  logic       lut_we = 1'b0, lut_wdata = 1'b0, trig_valid, trigger;
  logic [4:0] lut_waddr = '0;
  logic [31:0] table_bits;
  int checks = 0, failures = 0;

  l15_output_trigger dut (.clk, .rst_n, .in_valid, .near_x, .near_z, .coef, .dis, .flag_1m,
                          .lut_we, .lut_waddr, .lut_wdata, .trig_valid, .trigger);

  task automatic load(logic [31:0] t);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); lut_we = 1'b1; lut_waddr = 5'(a); lut_wdata = t[a];
    end
    @(negedge clk); lut_we = 1'b0;
  endtask

  task automatic sweep();
    for (int a = 0; a < 32; a++) begin
      {near_x, near_z, coef, dis, flag_1m} = 5'(a);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (trig_valid !== 1'b1 || trigger !== table_bits[a]) begin
        failures++;
        $display("FAIL addr=%0d trig=%0d exp=%0d", a, trigger, table_bits[a]);
      end
      @(negedge clk);
      checks++;
      if (trig_valid !== 1'b0 || trigger !== 1'b0) failures++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    table_bits = 32'hC0A8_3E71;
    load(table_bits); sweep();
    table_bits = ~table_bits;
    load(table_bits); sweep();
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
