// l15_pkg -- shared types and helper functions of the GRID Level-1.5 trigger.
//
// The silicon tracker trigger bits of one projection form a 12 x 12 matrix:
// row i is ST view i (row 1 first), column j is TAA1 chip j in detector order.
// A matrix is stored as mat[i-1][j-1]; bit 0 of a row is column 1, which lies
// next to the left AC lateral panel (side 2 for X, side 1 for Z); column 12 lies
// next to the right panel (side 4 for X, side 3 for Z).  The sizes, the 4-bit
// width of the COEF/DIS quantities and the 16/5-bit LUT addresses follow the
// specification; the enum encodings, the configuration record and the TC
// target codes are choices of this design.
package l15_pkg;

  localparam int unsigned N_ROWS  = 12;   // ST views per projection
  localparam int unsigned N_COLS  = 12;   // TAA1 chips per view
  localparam int unsigned Q_W     = 4;    // width of every COEF/DIS quantity
  localparam int unsigned LUT16_W = 16;   // COEF and DIS LUT address width
  localparam int unsigned LUT5_W  = 5;    // Level-1.5 LUT address width

  typedef logic [Q_W-1:0] quant_t;

  // Decision of the access procedure for one event.
  typedef enum logic [2:0] {
    ACC_2M     = 3'd0,   // both matrices, 2M logic
    ACC_1M_X   = 3'd1,   // X matrix only, 1M logic
    ACC_1M_Z   = 3'd2,   // Z matrix only, 1M logic
    ACC_FEF    = 3'd3,   // processing interrupted, Front-End Freeing
    ACC_REJECT = 3'd4    // event rejected
  } acc_mode_t;

  // Target of a TC write.
  typedef enum logic [1:0] {
    TC_CFG      = 2'd0,
    TC_COEF_LUT = 2'd1,
    TC_DIS_LUT  = 2'd2,
    TC_L15_LUT  = 2'd3
  } tc_target_t;

  // TC-programmable settings.  Packed so that a TC configuration write maps
  // tc_wdata[12:0] straight onto it: n_x in [3:0] ... other_fef in [12].
  typedef struct packed {
    logic   other_fef;   // rule-5 events: 1 = FEF, 0 = rejection
    logic   dis_en;      // DIS stage enabled
    logic   coef_en;     // COEF stage enabled
    logic   near_z_en;   // Z-NEAR stage enabled
    logic   near_x_en;   // X-NEAR stage enabled
    quant_t n_z;         // NEAR column count for Z
    quant_t n_x;         // NEAR column count for X
  } l15_cfg_t;

  localparam l15_cfg_t CFG_RESET = '{other_fef: 1'b1, dis_en: 1'b1, coef_en: 1'b1,
                                     near_z_en: 1'b1, near_x_en: 1'b1,
                                     n_z: 4'd2, n_x: 4'd2};

  // Results of processing one projection.
  typedef struct packed {
    logic   any_hit;   // at least one TAA1 fired
    quant_t i_fr;      // first fired row, 1-based (0 if none)
    quant_t i_lr;      // last fired row, 1-based (0 if none)
    logic   near_hit;  // NEAR bit, before enable / 1M masking
    quant_t d_w;       // column span |j_lc - j_fc|
    quant_t d_z;       // row span |i_lr - i_fr|
    quant_t dis_fv;    // distance to the panel on the first fired view
    quant_t dis_lv;    // distance to the panel on the last fired view
  } proj_q_t;

endpackage
