// l15_lut -- TC-programmable 2^ADDR_W x 1 look-up table.
//
// One write port (loaded by telecommand) and one synchronous read port: with
// re high, rdata shows the word at raddr after the next rising edge and holds
// it otherwise.  A read of the address written in the same clock returns the
// old word.  The contents are not reset; they must be loaded before use.  The
// COEF and DIS LUTs (ADDR_W = 16) and the Level-1.5 LUT (ADDR_W = 5) are
// instances.  The one-bit word and the synchronous read are choices of this
// design, suited to an on-chip block RAM.
module l15_lut #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic              wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic              rdata
);

  logic mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
