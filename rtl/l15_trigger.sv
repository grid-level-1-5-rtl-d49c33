// l15_trigger -- GRID Level-1.5 trigger, top level.
//
// Rejects charged particles entering the silicon tracker through the lateral
// anti-coincidence (AC) panels.  For each event the access procedure looks at
// the fired AC lateral sides and the X/Z View Trigger Strobes and chooses 2M
// logic (both matrices), 1M logic (one matrix), FEF or rejection.  The X and
// Z trigger matrices (12 views x 12 TAA1 chips) are each reduced to their
// sub-matrix of fired views and processed in parallel by three algorithms:
//   NEAR  a fired chip in the n columns next to the fired panel,
//   COEF  column span dW and view span dZ, looked up in a 64K x 1 LUT,
//   DIS   panel-to-track distance on the first and last fired view, looked
//         up in a second 64K x 1 LUT.
// X-NEAR, Z-NEAR, COEF, DIS and the 1M flag address the 32 x 1 Level-1.5
// LUT, whose bit is the trigger.  In 1M logic the orthogonal NEAR is held
// inactive and the orthogonal COEF/DIS address fields are zero.  n_X, n_Z,
// the stage enables, the rule-5 choice and all three LUTs are programmed by
// TC through the tc_* port (see l15_tc_regs).
//
// Timing (a choice of this design, the specification gives none): one event
// per clock.  Clock 1 registers the access decision and the per-projection
// results, clock 2 reads the COEF and DIS LUTs, clock 3 reads the Level-1.5
// LUT; out_* belong to the event presented with ev_valid 3 clocks earlier.
// Events sent to FEF or rejection come out with the same latency, with
// out_trigger and the partial bits at 0.
module l15_trigger #(
  parameter int unsigned N_ROWS = l15_pkg::N_ROWS,
  parameter int unsigned N_COLS = l15_pkg::N_COLS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // event
  input  logic                          ev_valid,
  input  logic [N_ROWS-1:0][N_COLS-1:0] x_bits,     // [view i-1][TAA1 j-1]
  input  logic [N_ROWS-1:0][N_COLS-1:0] z_bits,
  input  logic [3:0][2:0]               ac_trig,    // [side-1][signal]
  input  logic                          strobe_x,
  input  logic                          strobe_z,
  // telecommand
  input  logic                          tc_we,
  input  l15_pkg::tc_target_t           tc_target,
  input  logic [15:0]                   tc_addr,
  input  logic [15:0]                   tc_wdata,
  output l15_pkg::l15_cfg_t             cfg,
  // decision
  output logic                          out_valid,
  output l15_pkg::acc_mode_t            out_mode,
  output logic                          out_trigger,
  output logic                          out_fef,
  output logic                          out_reject,
  output logic                          out_near_x,
  output logic                          out_near_z,
  output logic                          out_coef,
  output logic                          out_dis
);
  import l15_pkg::*;

  // ---------------------------------------------------------------- TC
  logic        coef_we, dis_we, l15_we, lut_wdata;
  logic [15:0] lut_waddr;

  l15_tc_regs u_tc (
    .clk, .rst_n, .tc_we, .tc_target, .tc_addr, .tc_wdata,
    .cfg, .coef_we, .dis_we, .l15_we, .lut_waddr, .lut_wdata);

  // ---------------------------------------------------------------- stage 0
  logic [3:0] ac_side;
  acc_mode_t  mode0;
  logic       x_right, z_right;
  proj_q_t    qx0, qz0;

  l15_access u_access (
    .ac_trig, .strobe_x, .strobe_z, .other_fef(cfg.other_fef),
    .ac_side, .mode(mode0), .x_from_right(x_right), .z_from_right(z_right));

  l15_matrix_proc #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_proc_x (
    .mat(x_bits), .from_right(x_right), .n_cols(cfg.n_x), .q(qx0));

  l15_matrix_proc #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_proc_z (
    .mat(z_bits), .from_right(z_right), .n_cols(cfg.n_z), .q(qz0));

  // ---------------------------------------------------------------- stage 1
  logic      v1, use_x1, use_z1, near_x1, near_z1;
  acc_mode_t mode1;
  proj_q_t   qx1, qz1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
    end else begin
      v1 <= ev_valid;
    end
    mode1   <= mode0;
    use_x1  <= mode0 == ACC_2M || mode0 == ACC_1M_X;
    use_z1  <= mode0 == ACC_2M || mode0 == ACC_1M_Z;
    near_x1 <= (mode0 == ACC_2M || mode0 == ACC_1M_X) && cfg.near_x_en && qx0.near_hit;
    near_z1 <= (mode0 == ACC_2M || mode0 == ACC_1M_Z) && cfg.near_z_en && qz0.near_hit;
    qx1     <= qx0;
    qz1     <= qz0;
  end

  logic proc1;   // event is processed by 2M or 1M logic
  assign proc1 = v1 && (use_x1 || use_z1);

  // ---------------------------------------------------------------- stage 2
  logic      coef2, dis2, v2, near_x2, near_z2;
  acc_mode_t mode2;

  l15_coef_trigger u_coef (
    .clk, .rst_n, .in_valid(proc1), .use_x(use_x1), .use_z(use_z1), .en(cfg.coef_en),
    .d_w_x(qx1.d_w), .d_z_x(qx1.d_z), .d_w_z(qz1.d_w), .d_z_z(qz1.d_z),
    .lut_we(coef_we), .lut_waddr(lut_waddr), .lut_wdata(lut_wdata), .coef(coef2));

  l15_dis_trigger u_dis (
    .clk, .rst_n, .in_valid(proc1), .use_x(use_x1), .use_z(use_z1), .en(cfg.dis_en),
    .dis_fv_x(qx1.dis_fv), .dis_lv_x(qx1.dis_lv), .dis_fv_z(qz1.dis_fv), .dis_lv_z(qz1.dis_lv),
    .lut_we(dis_we), .lut_waddr(lut_waddr), .lut_wdata(lut_wdata), .dis(dis2));

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    mode2   <= mode1;
    near_x2 <= near_x1;
    near_z2 <= near_z1;
  end

  logic proc2, flag_1m2;
  assign proc2    = v2 && (mode2 == ACC_2M || mode2 == ACC_1M_X || mode2 == ACC_1M_Z);
  assign flag_1m2 = mode2 == ACC_1M_X || mode2 == ACC_1M_Z;

  // ---------------------------------------------------------------- stage 3
  logic trig3, trig_valid3;

  l15_output_trigger u_out (
    .clk, .rst_n, .in_valid(proc2), .near_x(near_x2), .near_z(near_z2),
    .coef(coef2), .dis(dis2), .flag_1m(flag_1m2),
    .lut_we(l15_we), .lut_waddr(lut_waddr[LUT5_W-1:0]), .lut_wdata(lut_wdata),
    .trig_valid(trig_valid3), .trigger(trig3));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v2;
    out_mode   <= mode2;
    out_fef    <= v2 && mode2 == ACC_FEF;
    out_reject <= v2 && mode2 == ACC_REJECT;
    out_near_x <= v2 && near_x2;
    out_near_z <= v2 && near_z2;
    out_coef   <= v2 && coef2;
    out_dis    <= v2 && dis2;
  end

  assign out_trigger = trig3;

  // A processed event always gets its Level-1.5 LUT read.
  assert property (@(posedge clk) disable iff (!rst_n) trig_valid3 |-> out_valid);

endmodule
