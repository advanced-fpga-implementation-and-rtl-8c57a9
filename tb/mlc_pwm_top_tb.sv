// mlc_pwm_top_tb: end-to-end testbench of mlc_pwm_top at its default
// parameters (5 levels, 100 MHz clock, 50 Hz references, 5 kHz SSVM).
//
// Sequence: one full 50 Hz period in each of PD, POD and APOD, one in SSVM at
// full index (5 kHz), half a period in SSVM at half index (m_full = 0), and a
// stretch of SSVM at 10 kHz. Checks:
//  - carrier modes, every clock: the gates of all three legs against a
//    carrier model kept here from the clock count (triangle 0..50..0, one step
//    every 302 clocks, bands of 50, inversion pattern of the mode), and the
//    DAC word against the carrier-path output plus 128;
//  - SSVM, every switching period that stays in one sector: volt-seconds of the line-to-line levels
//    against those of the references, (LEVELS-1)*k*(va-vb)/VDC per clock, to
//    within 2.5% of full scale; the DAC word is the SSVM output;
//  - every clock: legal leg states;
//  - the time base advances every 20 clocks at 5 kHz and every 10 at 10 kHz;
//  - the half index halves the largest line volt-seconds of a period.
// Mechanisms counted, each must occur: the four modes, all five levels on
// leg a in each mode, all six sectors, upper and lower triangles, the index
// step, both switching frequencies.
module mlc_pwm_top_tb;
  import mlc_pkg::*;

  localparam int LEVELS   = 5;
  localparam int NL       = LEVELS - 1;
  localparam int BAND     = 50;
  localparam int CAR_P    = 2 * (150 + 1);
  localparam int REF_P    = 2 * (3332 + 1);
  localparam int FUND     = 300 * REF_P;     // clocks per 50 Hz period
  localparam int VDC_SSVM = 180;

  logic clk = 1'b0;
  logic rst = 1'b1;
  pwm_mode_e mode;
  ts_sel_e sel;
  logic m_full;
  logic [DW-1:0] va_ref, vb_ref, vc_ref;
  logic [15:0] vp;
  logic [2:0] sector;
  logic [NL-1:0] s_a, s_b, s_c;
  logic [DW-1:0] cb_va_out, cb_vb_out, cb_vc_out, ssvm_va_out, ssvm_vb_out, ssvm_vc_out, dac_a;

  mlc_pwm_top dut (
    .clk, .rst, .mode, .select_ts(sel), .m_full, .va_ref, .vb_ref, .vc_ref, .vp, .sector,
    .s_a, .s_b, .s_c, .cb_va_out, .cb_vb_out, .cb_vc_out,
    .ssvm_va_out, .ssvm_vb_out, .ssvm_vc_out, .dac_a);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned edges = 0;             // clock edges since reset release
  int level_seen [4][LEVELS];
  int sector_seen [7];
  int n_upper = 0, n_lower = 0, n_index_steps = 0, n_5k = 0, n_10k = 0;
  int mode_seen [4];
  int n_boundary = 0;                     // SSVM periods that crossed a sector edge

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %0d expected %0d (edge %0d)", what, got, exp, edges);
    end
  endtask

  function automatic int lvl(logic [NL-1:0] s);
    int l;
    l = 0;
    for (int i = 0; i < NL; i++) if (s[i]) l++;
    return l;
  endfunction

  function automatic bit legal(logic [NL-1:0] s);
    for (int i = 1; i < NL; i++) if (s[i - 1] && !s[i]) return 1'b0;
    return 1'b1;
  endfunction

  // expected carrier-path gates of one leg
  function automatic logic [NL-1:0] exp_gates(pwm_mode_e m, int ref_v, longint e);
    logic [NL-1:0] g;
    int n, r, d;
    n = int'(e / CAR_P);
    r = n % (2 * BAND);
    d = (r <= BAND) ? r : 2 * BAND - r;
    for (int i = 0; i < NL; i++) begin
      int k, car;
      bit inv;
      k = NL - 1 - i;
      case (m)
        PWM_POD:  inv = (k < NL / 2);
        PWM_APOD: inv = (k % 2 == 1);
        default:  inv = 1'b0;
      endcase
      car = k * BAND + (inv ? BAND - d : d);
      g[i] = (ref_v > car);
    end
    return g;
  endfunction

  // one clock, with the checks common to every mode
  task automatic tick();
    @(posedge clk);
    edges++;
    #1;
    check("legal a", legal(s_a), 1);
    check("legal b", legal(s_b), 1);
    check("legal c", legal(s_c), 1);
    level_seen[int'(mode)][lvl(s_a)]++;
    mode_seen[int'(mode)]++;
  endtask

  task automatic run_carrier(pwm_mode_e m, int clocks);
    mode = m;
    for (int t = 0; t < clocks; t++) begin
      tick();
      check("gates a", s_a, exp_gates(m, int'(va_ref), edges));
      check("gates b", s_b, exp_gates(m, int'(vb_ref), edges));
      check("gates c", s_c, exp_gates(m, int'(vc_ref), edges));
      check("dac word", dac_a, DW'(cb_va_out + 8'd128));
    end
  endtask

  // SSVM: check volt-seconds per switching period; returns the largest
  // |a-b| volt-seconds of the periods checked (in level*clocks)
  task automatic run_ssvm(bit mf, ts_sel_e s, int clocks, output real max_ab);
    real exp_ab, exp_bc, k;
    longint got_ab, got_bc;
    int prev_vp, periods, last_step, clk_per_step;
    bit armed, sec_changed;
    logic [2:0] sec_start;
    mode = PWM_SSVM;
    m_full = mf;
    sel = s;
    k = mf ? 1.0 : 0.5;
    clk_per_step = (s == TS_5K) ? 20 : 10;
    exp_ab = 0; exp_bc = 0; got_ab = 0; got_bc = 0;
    sec_changed = 1'b0; sec_start = sector;
    prev_vp = int'(vp); periods = 0; armed = 1'b0; max_ab = 0; last_step = -1;
    for (int t = 0; t < clocks; t++) begin
      tick();
      check("dac word", dac_a, ssvm_va_out);
      sector_seen[sector]++;
      if (dut.u_ssvm.delta2) n_lower++; else n_upper++;
      if (int'(vp) != prev_vp) begin
        if (last_step >= 0 && armed) begin
          check("clocks per time-base step", t - last_step, clk_per_step);
          if (s == TS_5K) n_5k++; else n_10k++;
        end
        last_step = t;
      end
      if (sector != sec_start) sec_changed = 1'b1;
      if (int'(vp) == 0 && prev_vp == 1000) begin
        if (armed && sec_changed) n_boundary++;
        if (armed && !sec_changed) begin
          real full, d_ab, d_bc;
          full = real'(NL) * 1001.0 * real'(clk_per_step);
          d_ab = real'(got_ab) - exp_ab;
          d_bc = real'(got_bc) - exp_bc;
          checks++;
          if (d_ab > 0.025 * full || d_ab < -0.025 * full || d_bc > 0.025 * full || d_bc < -0.025 * full) begin
            failures++;
            if (failures < 15) $display("FAIL volt-seconds: ab %0d vs %f, bc %0d vs %f", got_ab, exp_ab, got_bc, exp_bc);
          end
          if (exp_ab > max_ab) max_ab = exp_ab;
          if (real'(got_ab) > max_ab) max_ab = real'(got_ab);
          periods++;
        end
        armed = 1'b1;
        sec_changed = 1'b0;
        sec_start = sector;
        exp_ab = 0; exp_bc = 0; got_ab = 0; got_bc = 0;
      end
      prev_vp = int'(vp);
      got_ab += longint'(lvl(s_a) - lvl(s_b));
      got_bc += longint'(lvl(s_b) - lvl(s_c));
      exp_ab += real'(NL) * k * real'(int'(va_ref) - int'(vb_ref)) / real'(VDC_SSVM);
      exp_bc += real'(NL) * k * real'(int'(vb_ref) - int'(vc_ref)) / real'(VDC_SSVM);
    end
    check("switching periods checked", int'(periods > 0), 1);
  endtask

  initial begin
    real max_full, max_half, dummy;
    for (int m = 0; m < 4; m++) begin
      mode_seen[m] = 0;
      for (int l = 0; l < LEVELS; l++) level_seen[m][l] = 0;
    end
    for (int s = 0; s < 7; s++) sector_seen[s] = 0;
    mode = PWM_PD; sel = TS_5K; m_full = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);                       // edge that sees rst low first
    edges = 1;
    #1;
    run_carrier(PWM_PD, FUND);
    run_carrier(PWM_POD, FUND);
    run_carrier(PWM_APOD, FUND);
    run_ssvm(1'b1, TS_5K, FUND, max_full);
    run_ssvm(1'b0, TS_5K, FUND / 2, max_half);
    n_index_steps++;
    run_ssvm(1'b1, TS_10K, FUND / 4, dummy);
    // mechanisms
    for (int m = 0; m < 4; m++) begin
      check($sformatf("mode %0d used", m), int'(mode_seen[m] > 0), 1);
      for (int l = 0; l < LEVELS; l++)
        check($sformatf("mode %0d level %0d on leg a", m, l), int'(level_seen[m][l] > 0), 1);
    end
    for (int s = 1; s <= 6; s++) check($sformatf("sector %0d", s), int'(sector_seen[s] > 0), 1);
    check("upper triangles", int'(n_upper > 0), 1);
    check("lower triangles", int'(n_lower > 0), 1);
    check("index step", n_index_steps, 1);
    check("5 kHz steps", int'(n_5k > 0), 1);
    check("10 kHz steps", int'(n_10k > 0), 1);
    checks++;
    if (max_half < 0.4 * max_full || max_half > 0.6 * max_full) begin
      failures++;
      $display("FAIL half index: largest volt-seconds %f vs %f at full index", max_half, max_full);
    end
    $display("modes %0d/%0d/%0d/%0d clocks, sectors %0d %0d %0d %0d %0d %0d, upper %0d lower %0d, %0d periods crossed a sector edge",
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3], sector_seen[1], sector_seen[2],
             sector_seen[3], sector_seen[4], sector_seen[5], sector_seen[6], n_upper, n_lower, n_boundary);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * FUND + FUND / 2 + FUND / 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
