// l15_ref_pkg -- reference model of the Level-1.5 trigger for the testbenches.
//
// Written from the specification independently of the RTL: it works on the
// list of fired chips with 1-based (view, chip) coordinates and measures the
// distance of chip j from the fired panel as j-1 (panel next to column 1) or
// 12-j (panel next to column 12).  Also holds a random matrix generator.
package l15_ref_pkg;

  localparam int NR = 12;
  localparam int NC = 12;

  typedef logic [NR-1:0][NC-1:0] mat_t;

  typedef struct {
    bit any;
    int ifr, ilr, near_hit, dw, dz, dfv, dlv;
  } ref_q_t;

  // Modes, numbered as the design's acc_mode_t.
  localparam int M_2M = 0, M_1MX = 1, M_1MZ = 2, M_FEF = 3, M_REJ = 4;

  function automatic int dist_of(int j, bit from_right);
    return from_right ? NC - j : j - 1;
  endfunction

  function automatic ref_q_t ref_proj(mat_t m, bit from_right, int n);
    ref_q_t r;
    int dmin, dmax;
    r.any = 0; r.ifr = 0; r.ilr = 0; r.near_hit = 0; r.dw = 0; r.dz = 0; r.dfv = 0; r.dlv = 0;
    dmin = 99; dmax = -1;
    for (int i = 1; i <= NR; i++)
      for (int j = 1; j <= NC; j++)
        if (m[i-1][j-1]) begin
          if (!r.any) r.ifr = i;
          r.any = 1;
          r.ilr = i;
          if (dist_of(j, from_right) < n) r.near_hit = 1;
          if (dist_of(j, from_right) < dmin) dmin = dist_of(j, from_right);
          if (dist_of(j, from_right) > dmax) dmax = dist_of(j, from_right);
        end
    if (r.any) begin
      r.dw = dmax - dmin;
      r.dz = r.ilr - r.ifr;
      r.dfv = 99; r.dlv = 99;
      for (int j = 1; j <= NC; j++) begin
        if (m[r.ifr-1][j-1] && dist_of(j, from_right) < r.dfv) r.dfv = dist_of(j, from_right);
        if (m[r.ilr-1][j-1] && dist_of(j, from_right) < r.dlv) r.dlv = dist_of(j, from_right);
      end
    end
    return r;
  endfunction

  // sides[k] = side k+1 fired
  function automatic int ref_access(bit [3:0] sides, bit sx, bit sz, bit other_fef);
    int other = other_fef ? M_FEF : M_REJ;
    case (sides)
      4'b0010, 4'b1000: return sx ? M_1MX : M_FEF;            // side 2 or 4 alone (X)
      4'b0001, 4'b0100: return sz ? M_1MZ : M_FEF;            // side 1 or 3 alone (Z)
      4'b0011, 4'b0110, 4'b1100, 4'b1001:                      // adjacent pairs
        if (sx && sz) return M_2M;
        else if (sx)  return M_1MX;
        else if (sz)  return M_1MZ;
        else          return other;
      default: return other;
    endcase
  endfunction

  // Random matrix: empty, a single straight or slanted track, or noise.
  function automatic mat_t rand_mat();
    mat_t m = '0;
    int kind = $urandom_range(0, 9);
    if (kind == 0) return m;
    if (kind <= 5) begin
      int i0 = $urandom_range(0, NR-1);
      int i1 = $urandom_range(i0, NR-1);
      int j0 = $urandom_range(0, NC-1);
      int slope = $urandom_range(0, 4) - 2;
      for (int i = i0; i <= i1; i++) begin
        int j = j0 + slope * (i - i0) / 2;
        if (j >= 0 && j < NC) m[i][j] = 1'b1;
      end
      if (m == '0) m[i0][j0] = 1'b1;
    end else begin
      int thr = $urandom_range(1, 20);
      for (int i = 0; i < NR; i++)
        for (int j = 0; j < NC; j++)
          if ($urandom_range(0, 99) < thr) m[i][j] = 1'b1;
    end
    return m;
  endfunction

endpackage
