// carrier_gen_tb: self-checking testbench of carrier_gen.
// Two instances (5 levels with bands of 50, 9 levels with bands of 25) run
// with a short prescaler. After every count step the carriers are compared
// with a triangle computed here from the number of steps, under a technique
// select that changes at random, and the step spacing is checked.
module carrier_gen_tb;
  import mlc_pkg::*;

  localparam int HD = 1;
  localparam int P  = 2 * (HD + 1);

  logic clk = 1'b0;
  logic rst = 1'b1;
  pwm_mode_e mode;
  logic step5, step9;
  logic [DW-1:0] car5 [4];
  logic [DW-1:0] car9 [8];
  int checks = 0, failures = 0;

  carrier_gen #(.LEVELS(5), .BAND(50), .HALF_DIV(HD)) dut5 (
    .clk, .rst, .mode, .step(step5), .carrier(car5));
  carrier_gen #(.LEVELS(9), .BAND(25), .HALF_DIV(HD)) dut9 (
    .clk, .rst, .mode, .step(step9), .carrier(car9));

  always #5 clk = ~clk;

  // triangle 0..band..0 after n steps
  function automatic int tri_w(int n, int band);
    int r;
    r = n % (2 * band);
    return (r <= band) ? r : 2 * band - r;
  endfunction

  // expected carrier of band k (0 = bottom) among nc carriers
  function automatic int exp_car(pwm_mode_e m, int k, int nc, int band, int n);
    bit inv;
    case (m)
      PWM_POD:  inv = (k < nc / 2);
      PWM_APOD: inv = (k % 2 == 1);
      default:  inv = 1'b0;
    endcase
    return k * band + (inv ? band - tri_w(n, band) : tri_w(n, band));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int nsteps = 0;
  int seen_inv_pod = 0, seen_inv_apod = 0;

  initial begin
    int cyc;
    mode = PWM_PD;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    cyc = 0;
    // 6 carrier periods of the 5-level instance, 12 of the 9-level one
    while (nsteps < 600) begin
      @(posedge clk);
      cyc++;
      if (cyc % P == 0) nsteps++;
      #1;
      check("step spacing", int'(step5), int'(cyc % P == P - 1));
      check("step equal", int'(step9), int'(step5));
      for (int m = 0; m < 4; m++) begin
        mode = pwm_mode_e'(m);
        #1;
        for (int i = 0; i < 4; i++)
          check($sformatf("car5[%0d] mode %0d step %0d", i, m, nsteps), int'(car5[i]),
                exp_car(mode, 3 - i, 4, 50, nsteps));
        for (int i = 0; i < 8; i++)
          check($sformatf("car9[%0d] mode %0d", i, m), int'(car9[i]),
                exp_car(mode, 7 - i, 8, 25, nsteps));
        if (m == 1 && car5[3] != car5[0] - 8'd150) seen_inv_pod++;
        if (m == 2 && car5[2] != car5[3] + 8'd50) seen_inv_apod++;
      end
      mode = pwm_mode_e'($urandom_range(0, 3));
    end
    check("POD opposition seen", int'(seen_inv_pod > 0), 1);
    check("APOD opposition seen", int'(seen_inv_apod > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600 * P + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
