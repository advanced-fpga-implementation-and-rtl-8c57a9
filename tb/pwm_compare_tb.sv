// pwm_compare_tb: self-checking testbench of pwm_compare (5 levels).
// Applies random and boundary references and carriers and checks every gate
// against "reference strictly greater than carrier".
module pwm_compare_tb;
  import mlc_pkg::*;

  logic [DW-1:0] va, vb, vc;
  logic [DW-1:0] car [4];
  logic [3:0] s_a, s_b, s_c;
  int checks = 0, failures = 0;

  pwm_compare #(.LEVELS(5)) dut (.va, .vb, .vc, .carrier(car), .s_a, .s_b, .s_c);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_all();
    int ref_v [3];
    logic [3:0] g [3];
    #1;
    ref_v[0] = int'(va); ref_v[1] = int'(vb); ref_v[2] = int'(vc);
    g[0] = s_a; g[1] = s_b; g[2] = s_c;
    for (int x = 0; x < 3; x++)
      for (int i = 0; i < 4; i++)
        check($sformatf("phase %0d switch %0d", x, i + 1), int'(g[x][i]),
              int'(ref_v[x] > int'(car[i])));
  endtask

  initial begin
    // equality must give 0, one above must give 1
    for (int i = 0; i < 4; i++) car[i] = DW'(150 - 50 * i);
    va = 8'd150; vb = 8'd151; vc = 8'd0;
    check_all();
    check("equal gives off", int'(s_a[0]), 0);
    check("above gives on", int'(s_b[0]), 1);
    for (int t = 0; t < 2000; t++) begin
      va = DW'($urandom_range(0, 255));
      vb = DW'($urandom_range(0, 255));
      vc = DW'($urandom_range(0, 255));
      for (int i = 0; i < 4; i++) car[i] = DW'($urandom_range(0, 255));
      if (t % 3 == 0) vb = car[$urandom_range(0, 3)];
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
