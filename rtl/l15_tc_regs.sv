// l15_tc_regs -- telecommand (TC) configuration of the Level-1.5 trigger.
//
// Every setting the specification makes programmable by TC is written through
// one port: tc_we with tc_target selecting the configuration register or one
// of the three LUTs.  A TC_CFG write loads cfg from tc_wdata[12:0] in the
// l15_pkg::l15_cfg_t layout (n_x [3:0], n_z [7:4], near_x_en [8],
// near_z_en [9], coef_en [10], dis_en [11], other_fef [12]); cfg changes on
// the clock edge that samples the write.  A LUT write is passed on
// combinationally as a write enable for the selected table with tc_addr and
// tc_wdata[0].  Reset (synchronous, active low) restores l15_pkg::CFG_RESET.
// The port format, field layout and reset values are choices of this design.
module l15_tc_regs (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         tc_we,
  input  l15_pkg::tc_target_t          tc_target,
  input  logic [15:0]                  tc_addr,
  input  logic [15:0]                  tc_wdata,
  output l15_pkg::l15_cfg_t            cfg,
  output logic                         coef_we,
  output logic                         dis_we,
  output logic                         l15_we,
  output logic [15:0]                  lut_waddr,
  output logic                         lut_wdata
);
  import l15_pkg::*;

  always_ff @(posedge clk) begin
    if (!rst_n)                          cfg <= CFG_RESET;
    else if (tc_we && tc_target == TC_CFG) cfg <= l15_cfg_t'(tc_wdata[$bits(l15_cfg_t)-1:0]);
  end

  always_comb begin
    coef_we   = tc_we && tc_target == TC_COEF_LUT;
    dis_we    = tc_we && tc_target == TC_DIS_LUT;
    l15_we    = tc_we && tc_target == TC_L15_LUT;
    lut_waddr = tc_addr;
    lut_wdata = tc_wdata[0];
  end

endmodule
