// tb_l15_trigger -- end-to-end self-checking test of the Level-1.5 trigger at
// its default size (12 x 12 matrices, 64K-entry COEF/DIS LUTs).
//
// Loads all three LUTs through the TC port with pseudo-random patterns, then
// runs bursts of random events (one per clock, with occasional gaps) under a
// different TC configuration each burst.  Every event's decision is
// predicted by the reference model in l15_ref_pkg and compared field by field
// when it leaves the pipeline; the latency must be 3 clocks.  The test also
// counts how often each mechanism occurred (2M, 1M on X and on Z, FEF by
// rule 4, FEF and rejection by rule 5, each partial trigger firing, each
// stage disabled, fired panel on either edge, LUT reloaded between bursts)
// and fails if one never did.
module tb_l15_trigger;
  import l15_pkg::*;
  import l15_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n = 1'b0, ev_valid = 1'b0, strobe_x = 1'b0, strobe_z = 1'b0;
  logic [11:0][11:0]    x_bits = '0, z_bits = '0;
  logic [3:0][2:0]      ac_trig = '0;
  logic                 tc_we = 1'b0;
  tc_target_t           tc_target = TC_CFG;
  logic [15:0]          tc_addr = '0, tc_wdata = '0;
  l15_cfg_t             cfg;
  logic                 out_valid, out_trigger, out_fef, out_reject;
  logic                 out_near_x, out_near_z, out_coef, out_dis;
  acc_mode_t            out_mode;

  l15_trigger dut (.clk, .rst_n, .ev_valid, .x_bits, .z_bits, .ac_trig, .strobe_x, .strobe_z,
                   .tc_we, .tc_target, .tc_addr, .tc_wdata, .cfg,
                   .out_valid, .out_mode, .out_trigger, .out_fef, .out_reject,
                   .out_near_x, .out_near_z, .out_coef, .out_dis);

  // ---------------------------------------------------------------- model state
  int unsigned coef_seed, dis_seed;
  logic [31:0] l15_tab;

  function automatic bit lut_pat(int unsigned seed, int a);
    int unsigned h = (int'(a) ^ seed) * 32'h9E37_79B1;
    return h[17];
  endfunction

  typedef struct {
    int  mode;
    bit  nx, nz, coef, dis, trig;
    longint cyc;
  } exp_t;
  exp_t q[$];

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_mode[5] = '{0, 0, 0, 0, 0};
  int n_rule4 = 0, n_rule5_fef = 0, n_rule5_rej = 0;
  int n_nx = 0, n_nz = 0, n_coef = 0, n_dis = 0, n_trig1 = 0, n_trig0 = 0;
  int n_dis_off = 0, n_coef_off = 0, n_near_off = 0, n_xright = 0, n_zright = 0, n_reload = 0;

  // ---------------------------------------------------------------- TC helpers
  task automatic tc_write(tc_target_t t, int a, int d);
    @(negedge clk);
    tc_we = 1'b1; tc_target = t; tc_addr = 16'(a); tc_wdata = 16'(d);
    @(negedge clk);
    tc_we = 1'b0;
  endtask

  task automatic load_luts();
    @(negedge clk);
    tc_we = 1'b1;
    for (int a = 0; a < 65536; a++) begin
      tc_target = TC_COEF_LUT; tc_addr = 16'(a); tc_wdata = 16'(lut_pat(coef_seed, a));
      @(negedge clk);
      tc_target = TC_DIS_LUT;  tc_wdata = 16'(lut_pat(dis_seed, a));
      @(negedge clk);
    end
    for (int a = 0; a < 32; a++) begin
      tc_target = TC_L15_LUT; tc_addr = 16'(a); tc_wdata = 16'(l15_tab[a]);
      @(negedge clk);
    end
    tc_we = 1'b0;
  endtask

  // ---------------------------------------------------------------- stimulus
  task automatic drive_event(bit nx_en, bit nz_en, bit coef_en, bit dis_en, bit of,
                             int nx, int nz);
    bit [3:0] sides;
    int pick, m;
    ref_q_t rx, rz;
    exp_t e;
    bit use_x, use_z;
    pick = $urandom_range(0, 9);
    if (pick < 4) begin                                   // adjacent pair
      sides = '0;
      sides[($urandom_range(0, 1) != 0) ? 3 : 1] = 1'b1;
      sides[($urandom_range(0, 1) != 0) ? 2 : 0] = 1'b1;
    end else if (pick < 8) begin                          // one side
      sides = 4'(1 << $urandom_range(0, 3));
    end else begin
      sides = 4'($urandom_range(0, 15));
    end
    for (int s = 0; s < 4; s++) ac_trig[s] = sides[s] ? 3'($urandom_range(1, 7)) : 3'd0;
    strobe_x = $urandom_range(0, 4) != 0;
    strobe_z = $urandom_range(0, 4) != 0;
    x_bits = rand_mat();
    z_bits = rand_mat();
    ev_valid = 1'b1;

    m = ref_access(sides, strobe_x, strobe_z, of);
    use_x = (m == M_2M || m == M_1MX);
    use_z = (m == M_2M || m == M_1MZ);
    rx = ref_proj(x_bits, sides[3], nx);
    rz = ref_proj(z_bits, sides[2], nz);
    e.mode = m;
    e.nx = use_x && nx_en && (rx.near_hit != 0);
    e.nz = use_z && nz_en && (rz.near_hit != 0);
    begin
      int ca, da;
      ca = ((use_x ? rx.dw : 0) << 12) | ((use_x ? rx.dz : 0) << 8) |
           ((use_z ? rz.dw : 0) << 4) | (use_z ? rz.dz : 0);
      da = ((use_x ? rx.dfv : 0) << 12) | ((use_x ? rx.dlv : 0) << 8) |
           ((use_z ? rz.dfv : 0) << 4) | (use_z ? rz.dlv : 0);
      e.coef = (use_x || use_z) && coef_en && lut_pat(coef_seed, ca);
      e.dis  = (use_x || use_z) && dis_en && lut_pat(dis_seed, da);
    end
    e.trig = (use_x || use_z) &&
             l15_tab[{e.nx, e.nz, e.coef, e.dis, (m == M_1MX || m == M_1MZ)}];
    e.cyc = cycle;
    q.push_back(e);

    n_mode[m]++;
    if (m == M_FEF && $countones(sides) == 1) n_rule4++;
    else if (m == M_FEF) n_rule5_fef++;
    if (m == M_REJ) n_rule5_rej++;
    if (use_x && sides[3]) n_xright++;
    if (use_z && sides[2]) n_zright++;
    if ((use_x || use_z) && !coef_en) n_coef_off++;
    if ((use_x || use_z) && !dis_en) n_dis_off++;
    if (use_x && !nx_en && (rx.near_hit != 0)) n_near_off++;
  endtask

  // ---------------------------------------------------------------- checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (int'(out_mode) != e.mode || out_near_x != e.nx || out_near_z != e.nz ||
            out_coef != e.coef || out_dis != e.dis || out_trigger != e.trig ||
            out_fef != (e.mode == M_FEF) || out_reject != (e.mode == M_REJ)) begin
          failures++;
          if (failures < 20)
            $display("FAIL mode=%0d/%0d nx=%0d/%0d nz=%0d/%0d coef=%0d/%0d dis=%0d/%0d trig=%0d/%0d",
                     out_mode, e.mode, out_near_x, e.nx, out_near_z, e.nz,
                     out_coef, e.coef, out_dis, e.dis, out_trigger, e.trig);
        end
        checks++;
        // the event was driven after negedge of cycle e.cyc, sampled on the next
        // edge; the decision is seen 3 edges after that
        if (cycle - e.cyc != 3) begin
          failures++;
          $display("FAIL latency %0d", cycle - e.cyc);
        end
        if (e.nx) n_nx++;
        if (e.nz) n_nz++;
        if (e.coef) n_coef++;
        if (e.dis) n_dis++;
        if (e.mode <= M_1MZ) begin
          if (e.trig) n_trig1++; else n_trig0++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- main
  initial begin
    coef_seed = 32'h1234_5678;
    dis_seed  = 32'h0BAD_F00D;
    l15_tab   = 32'h6A3C_95E1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (cfg != CFG_RESET) failures++;
    load_luts();
    for (int burst = 0; burst < 40; burst++) begin
      bit nxe, nze, ce, de, of;
      int nx, nz;
      if (burst == 20) begin                 // reprogram every table by TC
        coef_seed = 32'h0F0F_1357; dis_seed = 32'h2468_ACE0; l15_tab = ~l15_tab;
        load_luts();
        n_reload++;
      end
      nxe = $urandom_range(0, 5) != 0; nze = $urandom_range(0, 5) != 0;
      ce  = $urandom_range(0, 5) != 0; de  = $urandom_range(0, 5) != 0;
      of  = 1'($urandom_range(0, 1));
      nx  = $urandom_range(0, 12);     nz  = $urandom_range(0, 12);
      tc_write(TC_CFG, 0, int'({3'b0, of, de, ce, nze, nxe, 4'(nz), 4'(nx)}));
      repeat (500) begin
        @(negedge clk);
        if ($urandom_range(0, 9) == 0) ev_valid = 1'b0;
        else drive_event(nxe, nze, ce, de, of, nx, nz);
      end
      @(negedge clk);
      ev_valid = 1'b0;
      repeat (6) @(negedge clk);
      checks++;
      if (q.size() != 0) begin
        failures++;
        $display("FAIL %0d events never came out", q.size());
        q.delete();
      end
    end
    // every mechanism must have occurred
    begin
      int cnt[$];
      cnt = '{n_mode[M_2M], n_mode[M_1MX], n_mode[M_1MZ], n_rule4, n_rule5_fef, n_rule5_rej,
              n_nx, n_nz, n_coef, n_dis, n_trig1, n_trig0, n_coef_off, n_dis_off, n_near_off,
              n_xright, n_zright, n_reload};
      $display("2M=%0d 1MX=%0d 1MZ=%0d rule4=%0d r5fef=%0d r5rej=%0d nearx=%0d nearz=%0d coef=%0d dis=%0d",
               cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5], cnt[6], cnt[7], cnt[8], cnt[9]);
      $display("trig1=%0d trig0=%0d coef_off=%0d dis_off=%0d near_off=%0d xright=%0d zright=%0d reload=%0d",
               cnt[10], cnt[11], cnt[12], cnt[13], cnt[14], cnt[15], cnt[16], cnt[17]);
      foreach (cnt[k]) begin
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never occurred", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
