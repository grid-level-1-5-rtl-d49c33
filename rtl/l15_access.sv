// l15_access -- Level-1.5 access procedure.
//
// Each AC lateral side signal is the OR of that side's three trigger
// signals.  From the fired sides and the two View Trigger Strobes the event
// is given a processing mode:
//   one side fired, its projection's strobe active   -> 1M on that matrix
//   one side fired, its projection's strobe inactive -> FEF
//   two adjacent sides fired, both strobes active     -> 2M
//   two adjacent sides fired, one strobe active       -> 1M on that matrix
//   anything else                                     -> FEF or rejection,
//                                                        chosen by other_fef
// Sides 2 and 4 flank the X matrix (2 next to column 1, 4 next to column 12)
// and sides 1 and 3 flank Z (1 next to column 1, 3 next to column 12), so two
// sides are adjacent when one of them is an X side and the other a Z side.
// x_from_right / z_from_right tell the matrix processors which edge the fired
// panel is on.  The rules follow the specification; sending "no side fired"
// and "two adjacent sides, no strobe" to the rule-5 choice follows its text
// literally.  Purely combinational.
module l15_access (
  input  logic [3:0][2:0]       ac_trig,      // [side-1][signal]
  input  logic                  strobe_x,
  input  logic                  strobe_z,
  input  logic                  other_fef,    // rule 5: 1 = FEF, 0 = rejection
  output logic [3:0]            ac_side,      // bit k = side k+1 fired
  output l15_pkg::acc_mode_t    mode,
  output logic                  x_from_right,
  output logic                  z_from_right
);
  import l15_pkg::*;

  logic x_fired, z_fired;   // an X side (2 or 4) / a Z side (1 or 3) fired
  logic [2:0] n_fired;
  acc_mode_t other;

  always_comb begin
    for (int s = 0; s < 4; s++) ac_side[s] = |ac_trig[s];
    n_fired = 3'(ac_side[0]) + 3'(ac_side[1]) + 3'(ac_side[2]) + 3'(ac_side[3]);
    x_fired = ac_side[1] | ac_side[3];
    z_fired = ac_side[0] | ac_side[2];
    x_from_right = ac_side[3];
    z_from_right = ac_side[2];
    other = other_fef ? ACC_FEF : ACC_REJECT;

    mode = other;
    if (n_fired == 3'd1) begin
      if (x_fired) mode = strobe_x ? ACC_1M_X : ACC_FEF;
      else         mode = strobe_z ? ACC_1M_Z : ACC_FEF;
    end else if (n_fired == 3'd2 && x_fired && z_fired) begin
      unique case ({strobe_x, strobe_z})
        2'b11:   mode = ACC_2M;
        2'b10:   mode = ACC_1M_X;
        2'b01:   mode = ACC_1M_Z;
        default: mode = other;
      endcase
    end
  end

endmodule
