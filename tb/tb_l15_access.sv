// tb_l15_access -- exhaustive self-checking test of the access procedure:
// every combination of the twelve AC signals, both strobes and the rule-5
// setting; also checks the per-side ORs and the fired-panel positions.
module tb_l15_access;
  import l15_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0][2:0]     ac_trig;
  logic                strobe_x, strobe_z, other_fef;
  logic [3:0]          ac_side;
  l15_pkg::acc_mode_t  mode;
  logic                x_from_right, z_from_right;
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  l15_access dut (.ac_trig, .strobe_x, .strobe_z, .other_fef,
                  .ac_side, .mode, .x_from_right, .z_from_right);

  initial begin
    for (int v = 0; v < 4096; v++)
      for (int s = 0; s < 8; s++) begin
        bit [3:0] sides;
        int exp_mode;
        ac_trig = 12'(v);
        {other_fef, strobe_x, strobe_z} = 3'(s);
        #1;
        for (int k = 0; k < 4; k++) sides[k] = (v >> (3 * k)) % 8 != 0;
        exp_mode = ref_access(sides, strobe_x, strobe_z, other_fef);
        seen[exp_mode]++;
        checks++;
        if (int'(mode) != exp_mode || ac_side != sides) begin
          failures++;
          if (failures < 10) $display("FAIL sides=%b sx=%0d sz=%0d mode=%0d exp=%0d",
                                      sides, strobe_x, strobe_z, mode, exp_mode);
        end
        if (exp_mode <= M_1MZ) begin
          checks++;
          if ((sides[3] && x_from_right !== 1'b1) || (sides[1] && x_from_right !== 1'b0) ||
              (sides[2] && z_from_right !== 1'b1) || (sides[0] && z_from_right !== 1'b0))
            failures++;
        end
      end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
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
