// l15_output_trigger -- output trigger logic: the Level-1.5 LUT.
//
// The four partial triggers and the 1M flag form the 5-bit address
// {near_x, near_z, coef, dis, flag_1m} (bit 4 down to bit 0, in the order the
// specification lists them); the TC-programmable 32 x 1 table gives the
// Level-1.5 trigger.  flag_1m is 1 for 1M logic and 0 for 2M logic (polarity
// chosen here).  trigger and trig_valid follow in_valid by one clock.
module l15_output_trigger #(
  parameter int unsigned ADDR_W = l15_pkg::LUT5_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              near_x,
  input  logic              near_z,
  input  logic              coef,
  input  logic              dis,
  input  logic              flag_1m,
  input  logic              lut_we,
  input  logic [ADDR_W-1:0] lut_waddr,
  input  logic              lut_wdata,
  output logic              trig_valid,
  output logic              trigger
);

  logic [ADDR_W-1:0] addr;
  logic              lut_q;

  assign addr = ADDR_W'({near_x, near_z, coef, dis, flag_1m});

  l15_lut #(.ADDR_W(ADDR_W)) u_lut (
    .clk, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .re(in_valid), .raddr(addr), .rdata(lut_q));

  always_ff @(posedge clk) begin
    if (!rst_n) trig_valid <= 1'b0;
    else        trig_valid <= in_valid;
  end

  assign trigger = trig_valid & lut_q;

endmodule
