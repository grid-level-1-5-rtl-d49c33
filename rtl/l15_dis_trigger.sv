// l15_dis_trigger -- DIS trigger: address formation and DIS LUT read.
//
// The 16-bit LUT address is {dis_fv_x, dis_lv_x, dis_fv_z, dis_lv_z}, most significant
// nibble first, in the order the specification lists the words.  In 1M logic
// the pair of the projection that is not processed is forced to zero
// (use_x / use_z low).  The LUT is read one clock after in_valid; when the
// stage is disabled by TC the read is by-passed and dis is held at 0.  The
// TC write port loads the table.  Latency: dis belongs to the distances
// presented one clock earlier.
module l15_dis_trigger #(
  parameter int unsigned ADDR_W = l15_pkg::LUT16_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              use_x,
  input  logic              use_z,
  input  logic              en,
  input  l15_pkg::quant_t   dis_fv_x,
  input  l15_pkg::quant_t   dis_lv_x,
  input  l15_pkg::quant_t   dis_fv_z,
  input  l15_pkg::quant_t   dis_lv_z,
  input  logic              lut_we,
  input  logic [ADDR_W-1:0] lut_waddr,
  input  logic              lut_wdata,
  output logic              dis
);
  import l15_pkg::*;

  logic [ADDR_W-1:0] addr;
  logic              lut_q, en_q;

  always_comb
    addr = ADDR_W'({use_x ? dis_fv_x : '0, use_x ? dis_lv_x : '0,
                    use_z ? dis_fv_z : '0, use_z ? dis_lv_z : '0});

  l15_lut #(.ADDR_W(ADDR_W)) u_lut (
    .clk, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .re(in_valid && en), .raddr(addr), .rdata(lut_q));

  always_ff @(posedge clk) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= in_valid && en;
  end

  assign dis  = en_q & lut_q;

endmodule
