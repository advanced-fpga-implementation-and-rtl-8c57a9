// ssvm_modulator_tb: self-checking testbench of ssvm_modulator.
// Three instances, all with VDC 180: 5 levels and 3 levels with pulses that
// start at the beginning of the period, and 5 levels with centred
// (symmetrical) pulses. For each test
// point the references are held, the time base vp is swept 0..1000 by the
// testbench, and:
//  - sector, triangle type and the durations t1..t3 are compared with a model
//    in real arithmetic (durations to within one count; the triangle type is
//    skipped exactly on a triangle on_edge);
//  - at every vp the three leg levels, mapped into sector 1, must be one of
//    the three vectors of the model's triangle, in first-redundant form;
//  - the volt-seconds of the line-to-line levels over the period must match
//    the reference: sum(l_a - l_b) = 1000*(LEVELS-1)*(va - vb)*k/VDC, and
//    likewise for b-c, to within a few counts (k = 1, or 1/2 with m_full=0).
// The worked 5-level example of the method (triangle with vectors 431, 432, 442) is one
// of the test points. Gate outputs are checked one clock after vp is applied.
// The centred instance gets the same vector and volt-second checks, and each
// of its legs must rise to its highest level by mid-period and fall back
// after it; in the example it must start at 431 and show 442 at mid-period.
module ssvm_modulator_tb;
  import mlc_pkg::*;

  localparam int VDC = 180;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [DW-1:0] va, vb, vc;
  logic m_full;
  logic [15:0] vp;
  logic [2:0] sec5, sec3;
  logic d25, d23;
  logic [15:0] t15, t25, t35, t13, t23, t33;
  logic [3:0] sa5, sb5, sc5;
  logic [1:0] sa3, sb3, sc3;
  logic [3:0] sas, sbs, scs;
  int checks = 0, failures = 0;
  int n_d1 = 0, n_d2 = 0;
  int sec_seen [7];

  ssvm_modulator #(.LEVELS(5), .VDC(VDC)) dut5 (
    .clk, .rst, .va, .vb, .vc, .m_full, .vp, .sector(sec5), .delta2(d25),
    .t1(t15), .t2(t25), .t3(t35), .s_a(sa5), .s_b(sb5), .s_c(sc5));
  ssvm_modulator #(.LEVELS(3), .VDC(VDC)) dut3 (
    .clk, .rst, .va, .vb, .vc, .m_full, .vp, .sector(sec3), .delta2(d23),
    .t1(t13), .t2(t23), .t3(t33), .s_a(sa3), .s_b(sb3), .s_c(sc3));

  ssvm_modulator #(.LEVELS(5), .VDC(VDC), .SYMMETRIC(1'b1)) dut5s (
    .clk, .rst, .va, .vb, .vc, .m_full, .vp, .sector(), .delta2(),
    .t1(), .t2(), .t3(), .s_a(sas), .s_b(sbs), .s_c(scs));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_near(string what, int got, int exp, int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %0d expected %0d (+-%0d)", what, got, exp, tol);
    end
  endtask

  // level of a leg = number of switches on; legal when a thermometer pattern
  function automatic int leg_level(logic [3:0] s, int nsw, output bit legal);
    int l;
    l = 0;
    legal = 1'b1;
    for (int i = 0; i < nsw; i++) if (s[i]) l++;
    for (int i = 1; i < nsw; i++) if (s[i - 1] && !s[i]) legal = 1'b0;
    return l;
  endfunction

  // model: sector by sorting, with ties resolved in the order 1,6,2,3,4,5
  function automatic int model_sector(int a, int b, int c);
    if (a >= b && b >= c) return 1;
    if (a >= c && c >= b) return 6;
    if (b >= a && a >= c) return 2;
    if (b >= c && c >= a) return 3;
    if (c >= b && b >= a) return 4;
    return 5;
  endfunction

  // physical leg (0=a,1=b,2=c) that holds the largest, middle, smallest value
  task automatic order(int sec, output int p [3]);
    case (sec)
      1: p = '{0, 1, 2};
      2: p = '{1, 0, 2};
      3: p = '{1, 2, 0};
      4: p = '{2, 1, 0};
      5: p = '{2, 0, 1};
      default: p = '{0, 2, 1};
    endcase
  endtask

  task automatic run_point(int a, int b, int c, bit mf, int lv);
    int nl, sec, p [3], r [3];
    real k, ug, uh, tt1, tt2, tt3;
    int g, h, vg [3], vh [3];
    bit upper, on_edge;
    int sum_ab, sum_bc, lv_got [3];
    int sym_ab, sym_bc, ls [3], ls_prev [3];
    bit sym_bad;
    bit legal;
    logic [2:0] sec_got;
    logic d2_got;
    int t_got [3];
    nl = lv - 1;
    va = DW'(a); vb = DW'(b); vc = DW'(c); m_full = mf;
    vp = 16'd0;
    repeat (2) @(posedge clk);
    #1;
    r = '{a, b, c};
    sec = model_sector(a, b, c);
    order(sec, p);
    k = mf ? 1.0 : 0.5;
    ug = real'(nl) * k * real'(r[p[0]] - r[p[1]]) / real'(VDC);
    uh = real'(nl) * k * real'(r[p[1]] - r[p[2]]) / real'(VDC);
    g = $rtoi(ug);
    h = $rtoi(uh);
    upper = (ug + uh < real'(g + h + 1));
    on_edge = ((ug + uh - real'(g + h + 1)) < 1e-9) && ((ug + uh - real'(g + h + 1)) > -1e-9);
    if (upper) begin
      tt2 = 1000.0 * (ug - g); tt3 = 1000.0 * (uh - h);
      vg[0] = g; vh[0] = h;
    end else begin
      tt2 = 1000.0 * (h + 1 - uh); tt3 = 1000.0 * (g + 1 - ug);
      vg[0] = g + 1; vh[0] = h + 1;
    end
    tt1 = 1000.0 - tt2 - tt3;
    vg[1] = g + 1; vh[1] = h;
    vg[2] = g; vh[2] = h + 1;
    if (lv == 5) begin
      sec_got = sec5; d2_got = d25; t_got = '{int'(t15), int'(t25), int'(t35)};
    end else begin
      sec_got = sec3; d2_got = d23; t_got = '{int'(t13), int'(t23), int'(t33)};
    end
    check($sformatf("L%0d sector (%0d,%0d,%0d)", lv, a, b, c), int'(sec_got), sec);
    if (!on_edge) begin
      check($sformatf("L%0d triangle type (%0d,%0d,%0d)", lv, a, b, c), int'(d2_got), int'(!upper));
      check_near("t1", t_got[0], $rtoi(tt1), 2);
      check_near("t2", t_got[1], $rtoi(tt2), 1);
      check_near("t3", t_got[2], $rtoi(tt3), 1);
    end
    if (upper) n_d1++; else n_d2++;
    sec_seen[sec]++;
    sum_ab = 0; sum_bc = 0;
    sym_ab = 0; sym_bc = 0; sym_bad = 1'b0; ls_prev = '{0, 0, 0};
    for (int t = 0; t <= 1000; t++) begin
      bit found;
      int u [3];
      vp = 16'(t);
      @(posedge clk);
      #1;
      if (lv == 5) begin
        lv_got[0] = leg_level(sa5, 4, legal); check("legal a", int'(legal), 1);
        lv_got[1] = leg_level(sb5, 4, legal); check("legal b", int'(legal), 1);
        lv_got[2] = leg_level(sc5, 4, legal); check("legal c", int'(legal), 1);
      end else begin
        lv_got[0] = leg_level({2'b00, sa3}, 2, legal); check("legal a", int'(legal), 1);
        lv_got[1] = leg_level({2'b00, sb3}, 2, legal); check("legal b", int'(legal), 1);
        lv_got[2] = leg_level({2'b00, sc3}, 2, legal); check("legal c", int'(legal), 1);
      end
      sum_ab += lv_got[0] - lv_got[1];
      sum_bc += lv_got[1] - lv_got[2];
      // map to sector 1 and compare with the three vectors
      u = '{lv_got[p[0]], lv_got[p[1]], lv_got[p[2]]};
      found = 1'b0;
      for (int v = 0; v < 3; v++)
        if (u[0] == nl && u[1] == nl - vg[v] && u[2] == nl - vg[v] - vh[v]) found = 1'b1;
      if (t < 1000) check($sformatf("L%0d vector at vp=%0d (%0d,%0d,%0d)", lv, t, u[0], u[1], u[2]),
                          int'(found), 1);
      if (lv == 5) begin
        ls[0] = leg_level(sas, 4, legal); check("centred legal a", int'(legal), 1);
        ls[1] = leg_level(sbs, 4, legal); check("centred legal b", int'(legal), 1);
        ls[2] = leg_level(scs, 4, legal); check("centred legal c", int'(legal), 1);
        sym_ab += ls[0] - ls[1];
        sym_bc += ls[1] - ls[2];
        u = '{ls[p[0]], ls[p[1]], ls[p[2]]};
        found = 1'b0;
        for (int v = 0; v < 3; v++)
          if (u[0] == nl && u[1] == nl - vg[v] && u[2] == nl - vg[v] - vh[v]) found = 1'b1;
        if (t < 1000) check($sformatf("centred vector at vp=%0d (%0d,%0d,%0d)", t, u[0], u[1], u[2]),
                            int'(found), 1);
        // rising up to mid-period, falling after it
        if (t > 0)
          for (int x = 0; x < 3; x++)
            if ((t <= 500 && ls[x] < ls_prev[x]) || (t > 500 && ls[x] > ls_prev[x])) sym_bad = 1'b1;
        ls_prev = ls;
        if (a == 172 && b == 140 && c == 80 && mf) begin
          if (t == 0)   check("centred example starts at 431", ls[0] * 100 + ls[1] * 10 + ls[2], 431);
          if (t == 500) check("centred example mid-period 442", ls[0] * 100 + ls[1] * 10 + ls[2], 442);
        end
      end
    end
    check_near($sformatf("L%0d volt-seconds a-b (%0d,%0d,%0d)", lv, a, b, c), sum_ab,
               $rtoi(1000.0 * real'(nl) * k * real'(a - b) / real'(VDC)), 2 * nl + 2);
    check_near($sformatf("L%0d volt-seconds b-c (%0d,%0d,%0d)", lv, a, b, c), sum_bc,
               $rtoi(1000.0 * real'(nl) * k * real'(b - c) / real'(VDC)), 2 * nl + 2);
    if (lv == 5) begin
      check_near($sformatf("centred volt-seconds a-b (%0d,%0d,%0d)", a, b, c), sym_ab,
                 $rtoi(1000.0 * real'(nl) * k * real'(a - b) / real'(VDC)), 2 * nl + 2);
      check_near($sformatf("centred volt-seconds b-c (%0d,%0d,%0d)", a, b, c), sym_bc,
                 $rtoi(1000.0 * real'(nl) * k * real'(b - c) / real'(VDC)), 2 * nl + 2);
      check($sformatf("centred pulses rise then fall (%0d,%0d,%0d)", a, b, c), int'(sym_bad), 0);
    end
  endtask

  initial begin
    va = '0; vb = '0; vc = '0; m_full = 1'b1; vp = '0;
    for (int i = 0; i < 7; i++) sec_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // the 5-level example: Ug in (0,1), Uh in (1,2), lower triangle,
    // vectors 431 (v1), 432 (v2), 442 (v3)
    run_point(172, 140, 80, 1'b1, 5);
    // one point per sector on a circle, then random points inside the hexagon
    for (int s = 0; s < 12; s++) begin
      real th;
      int a, b, c;
      th = 2.0 * 3.14159265358979 * (real'(s) + 0.5) / 12.0;
      a = $rtoi(100.0 + 80.0 * $cos(th));
      b = $rtoi(100.0 + 80.0 * $cos(th - 2.0944));
      c = $rtoi(100.0 + 80.0 * $cos(th + 2.0944));
      run_point(a, b, c, 1'b1, 5);
      run_point(a, b, c, 1'b1, 3);
      run_point(a, b, c, 1'b0, 5);
    end
    for (int t = 0; t < 60; t++) begin
      int a, b, c;
      a = $urandom_range(20, 200);
      b = $urandom_range(20, 200);
      c = $urandom_range(20, 200);
      run_point(a, b, c, 1'($urandom_range(0, 1)), (t % 2 == 0) ? 5 : 3);
    end
    // ties between references
    run_point(120, 120, 60, 1'b1, 5);
    run_point(150, 90, 90, 1'b1, 5);
    run_point(100, 100, 100, 1'b1, 3);
    for (int s = 1; s <= 6; s++) check($sformatf("sector %0d visited", s), int'(sec_seen[s] > 0), 1);
    check("upper triangles visited", int'(n_d1 > 0), 1);
    check("lower triangles visited", int'(n_d2 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
