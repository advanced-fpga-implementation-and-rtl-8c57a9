// mlc_pwm_levels_tb: end-to-end testbench of mlc_pwm_top for the other
// converter sizes: 3, 7 and 9 levels, run side by side on shared mode and
// select inputs. Each instance keeps every default except LEVELS and the
// carrier band height BAND (100, 33, 25), chosen so the stack of LEVELS-1
// carriers spans about the same 0..200 range as the 5-level default. The
// 7-level instance also uses centred SSVM pulses (SSVM_SYMMETRIC = 1).
//
// Sequence: one full 50 Hz period in each of PD, POD and APOD, then one in SSVM
// at 5 kHz and full index. Checks, for every instance:
//  - carrier modes, every clock: gates of all three legs against a carrier
//    model kept here from the clock count, and the DAC word;
//  - SSVM, every switching period that stays in one sector: line-to-line
//    volt-seconds must lie between those of the smallest and the largest
//    reference difference seen in the period, with a margin of 2.5% of full
//    scale. The modulator follows the references continuously, so a pulse
//    edge late in the period reflects the reference late in the period; near
//    the zero crossing of a line voltage this differs from the period's mean
//    by more than the margin. The DAC word is the SSVM output word;
//  - every clock: legal leg states.
// Mechanisms counted, each must occur: every level of leg a in every mode of
// every instance, all six sectors, upper and lower triangles.
module mlc_pwm_levels_tb;
  import mlc_pkg::*;

  localparam int NI = 3;
  localparam int LV [NI]   = '{3, 7, 9};
  localparam int BD [NI]   = '{100, 33, 25};
  localparam int CAR_P     = 2 * (150 + 1);
  localparam int REF_P     = 2 * (3332 + 1);
  localparam int FUND      = 300 * REF_P;     // clocks per 50 Hz period
  localparam int VDC_SSVM  = 180;
  localparam int MAXL      = 9;

  logic clk = 1'b0;
  logic rst = 1'b1;
  pwm_mode_e mode;
  ts_sel_e sel;
  logic m_full;

  // outputs of every instance, zero-extended to the widest gate vector
  wire [7:0]    ga [NI], gb [NI], gc [NI];
  wire [DW-1:0] ra [NI], rb [NI], rc [NI];
  wire [DW-1:0] cb_a [NI], sv_a [NI], dac [NI];
  wire [2:0]    sec [NI];
  wire          d2 [NI];
  wire [15:0]   vpw [NI];

  for (genvar g = 0; g < NI; g++) begin : g_lv
    localparam int L = LV[g];
    logic [L-2:0] s_a, s_b, s_c;
    mlc_pwm_top #(.LEVELS(L), .BAND(BD[g]), .SSVM_SYMMETRIC(g == 1)) dut (
      .clk, .rst, .mode, .select_ts(sel), .m_full,
      .va_ref(ra[g]), .vb_ref(rb[g]), .vc_ref(rc[g]), .vp(vpw[g]), .sector(sec[g]),
      .s_a, .s_b, .s_c,
      .cb_va_out(cb_a[g]), .cb_vb_out(), .cb_vc_out(),
      .ssvm_va_out(sv_a[g]), .ssvm_vb_out(), .ssvm_vc_out(), .dac_a(dac[g]));
    assign ga[g] = 8'(s_a);
    assign gb[g] = 8'(s_b);
    assign gc[g] = 8'(s_c);
    assign d2[g] = dut.u_ssvm.delta2;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned edges = 0;
  int level_seen [NI][4][MAXL];
  int sector_seen [NI][7];
  int n_upper [NI], n_lower [NI], n_periods [NI], n_boundary [NI];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %0d expected %0d (edge %0d)", what, got, exp, edges);
    end
  endtask

  function automatic int lvl(logic [7:0] s);
    int l;
    l = 0;
    for (int i = 0; i < 8; i++) if (s[i]) l++;
    return l;
  endfunction

  function automatic bit legal(logic [7:0] s, int nl);
    for (int i = 1; i < nl; i++) if (s[i - 1] && !s[i]) return 1'b0;
    for (int i = nl; i < 8; i++) if (s[i]) return 1'b0;
    return 1'b1;
  endfunction

  // expected carrier-path gates of one leg of instance g
  function automatic logic [7:0] exp_gates(pwm_mode_e m, int g, int ref_v, longint e);
    logic [7:0] q;
    int nl, band, n, r, d;
    nl = LV[g] - 1;
    band = BD[g];
    n = int'(e / CAR_P);
    r = n % (2 * band);
    d = (r <= band) ? r : 2 * band - r;
    q = '0;
    for (int i = 0; i < nl; i++) begin
      int k, car;
      bit inv;
      k = nl - 1 - i;
      case (m)
        PWM_POD:  inv = (2 * k < nl);
        PWM_APOD: inv = (k % 2 == 1);
        default:  inv = 1'b0;
      endcase
      car = k * band + (inv ? band - d : d);
      q[i] = (ref_v > car);
    end
    return q;
  endfunction

  task automatic tick();
    @(posedge clk);
    edges++;
    #1;
    for (int g = 0; g < NI; g++) begin
      check($sformatf("L%0d legal a", LV[g]), legal(ga[g], LV[g] - 1), 1);
      check($sformatf("L%0d legal b", LV[g]), legal(gb[g], LV[g] - 1), 1);
      check($sformatf("L%0d legal c", LV[g]), legal(gc[g], LV[g] - 1), 1);
      level_seen[g][int'(mode)][lvl(ga[g])]++;
    end
  endtask

  task automatic run_carrier(pwm_mode_e m);
    mode = m;
    for (int t = 0; t < FUND; t++) begin
      tick();
      for (int g = 0; g < NI; g++) begin
        check($sformatf("L%0d gates a", LV[g]), ga[g], exp_gates(m, g, int'(ra[g]), edges));
        check($sformatf("L%0d gates b", LV[g]), gb[g], exp_gates(m, g, int'(rb[g]), edges));
        check($sformatf("L%0d gates c", LV[g]), gc[g], exp_gates(m, g, int'(rc[g]), edges));
        check($sformatf("L%0d dac word", LV[g]), dac[g], DW'(cb_a[g] + 8'd128));
      end
    end
  endtask

  task automatic run_ssvm();
    real exp_ab [NI], exp_bc [NI];
    longint got_ab [NI], got_bc [NI];
    bit armed [NI], changed [NI];
    logic [2:0] sec0 [NI];
    int prev_vp [NI];
    int mn_ab [NI], mx_ab [NI], mn_bc [NI], mx_bc [NI], clocks [NI];
    mode = PWM_SSVM;
    m_full = 1'b1;
    sel = TS_5K;
    for (int g = 0; g < NI; g++) begin
      exp_ab[g] = 0; exp_bc[g] = 0; got_ab[g] = 0; got_bc[g] = 0;
      armed[g] = 1'b0; changed[g] = 1'b0; sec0[g] = sec[g]; prev_vp[g] = int'(vpw[g]);
      mn_ab[g] = 255; mx_ab[g] = -255; mn_bc[g] = 255; mx_bc[g] = -255; clocks[g] = 0;
    end
    for (int t = 0; t < FUND; t++) begin
      tick();
      for (int g = 0; g < NI; g++) begin
        int nl;
        nl = LV[g] - 1;
        check($sformatf("L%0d dac word", LV[g]), dac[g], sv_a[g]);
        sector_seen[g][sec[g]]++;
        if (d2[g]) n_lower[g]++; else n_upper[g]++;
        if (sec[g] != sec0[g]) changed[g] = 1'b1;
        if (int'(vpw[g]) == 0 && prev_vp[g] == 1000) begin
          if (armed[g] && changed[g]) n_boundary[g]++;
          if (armed[g] && !changed[g]) begin
            real full, sc, lo_ab, hi_ab, lo_bc, hi_bc;
            full = real'(nl) * 1001.0 * 20.0;
            sc = real'(nl) * real'(clocks[g]) / real'(VDC_SSVM);
            lo_ab = sc * real'(mn_ab[g]) - 0.025 * full;
            hi_ab = sc * real'(mx_ab[g]) + 0.025 * full;
            lo_bc = sc * real'(mn_bc[g]) - 0.025 * full;
            hi_bc = sc * real'(mx_bc[g]) + 0.025 * full;
            checks++;
            if (real'(got_ab[g]) < lo_ab || real'(got_ab[g]) > hi_ab ||
                real'(got_bc[g]) < lo_bc || real'(got_bc[g]) > hi_bc) begin
              failures++;
              if (failures < 15)
                $display("FAIL L%0d volt-seconds: ab %0d vs %f, bc %0d vs %f", LV[g], got_ab[g], exp_ab[g],
                         got_bc[g], exp_bc[g]);
            end
            n_periods[g]++;
          end
          armed[g] = 1'b1;
          changed[g] = 1'b0;
          sec0[g] = sec[g];
          exp_ab[g] = 0; exp_bc[g] = 0; got_ab[g] = 0; got_bc[g] = 0;
          mn_ab[g] = 255; mx_ab[g] = -255; mn_bc[g] = 255; mx_bc[g] = -255; clocks[g] = 0;
        end
        prev_vp[g] = int'(vpw[g]);
        got_ab[g] += longint'(lvl(ga[g]) - lvl(gb[g]));
        got_bc[g] += longint'(lvl(gb[g]) - lvl(gc[g]));
        exp_ab[g] += real'(nl) * real'(int'(ra[g]) - int'(rb[g])) / real'(VDC_SSVM);
        exp_bc[g] += real'(nl) * real'(int'(rb[g]) - int'(rc[g])) / real'(VDC_SSVM);
        clocks[g]++;
        if (int'(ra[g]) - int'(rb[g]) < mn_ab[g]) mn_ab[g] = int'(ra[g]) - int'(rb[g]);
        if (int'(ra[g]) - int'(rb[g]) > mx_ab[g]) mx_ab[g] = int'(ra[g]) - int'(rb[g]);
        if (int'(rb[g]) - int'(rc[g]) < mn_bc[g]) mn_bc[g] = int'(rb[g]) - int'(rc[g]);
        if (int'(rb[g]) - int'(rc[g]) > mx_bc[g]) mx_bc[g] = int'(rb[g]) - int'(rc[g]);
      end
    end
  endtask

  initial begin
    for (int g = 0; g < NI; g++) begin
      n_upper[g] = 0; n_lower[g] = 0; n_periods[g] = 0; n_boundary[g] = 0;
      for (int m = 0; m < 4; m++) for (int l = 0; l < MAXL; l++) level_seen[g][m][l] = 0;
      for (int s = 0; s < 7; s++) sector_seen[g][s] = 0;
    end
    mode = PWM_PD; sel = TS_5K; m_full = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    edges = 1;
    #1;
    run_carrier(PWM_PD);
    run_carrier(PWM_POD);
    run_carrier(PWM_APOD);
    run_ssvm();
    for (int g = 0; g < NI; g++) begin
      for (int m = 0; m < 4; m++)
        for (int l = 0; l < LV[g]; l++)
          check($sformatf("L%0d mode %0d level %0d on leg a", LV[g], m, l), int'(level_seen[g][m][l] > 0), 1);
      for (int s = 1; s <= 6; s++) check($sformatf("L%0d sector %0d", LV[g], s), int'(sector_seen[g][s] > 0), 1);
      check($sformatf("L%0d upper triangles", LV[g]), int'(n_upper[g] > 0), 1);
      check($sformatf("L%0d lower triangles", LV[g]), int'(n_lower[g] > 0), 1);
      check($sformatf("L%0d switching periods checked", LV[g]), int'(n_periods[g] > 50), 1);
      $display("L%0d: %0d switching periods checked, %0d crossed a sector edge, upper %0d lower %0d",
               LV[g], n_periods[g], n_boundary[g], n_upper[g], n_lower[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * FUND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
