// ref_gen_tb: self-checking testbench of ref_gen.
// Runs the generator with a short prescaler (one sample every 8 clocks) for
// two fundamental periods and checks, at every sample strobe, the three
// references against sine values computed here with real arithmetic, the
// spacing of the strobes, and the 20..180 swing.
module ref_gen_tb;
  import mlc_pkg::*;

  localparam int N  = 300;
  localparam int HD = 3;
  localparam int P  = 2 * (HD + 1);

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic stb;
  logic [DW-1:0] va, vb, vc;
  int checks = 0, failures = 0;

  ref_gen #(.HALF_DIV(HD)) dut (.clk, .rst, .sample_stb(stb), .va, .vb, .vc);

  always #5 clk = ~clk;

  function automatic int expect_v(int idx);
    real s;
    s = 80.0 + 80.0 * $sin(2.0 * 3.14159265358979 * real'(idx % N) / real'(N));
    return $rtoi(s + 0.5) + 20;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int k, last_cycle, cycle, vmin, vmax;
    k = 0; last_cycle = -1; cycle = 0; vmin = 255; vmax = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // values are zero after reset
    @(posedge clk);
    check("va after reset", int'(va), 0);
    while (k < 2 * N) begin
      @(posedge clk);
      cycle++;
      #1;
      if (stb) begin
        check("va", int'(va), expect_v(k));
        check("vb", int'(vb), expect_v(k + 199));
        check("vc", int'(vc), expect_v(k + 99));
        if (last_cycle >= 0) check("strobe spacing", cycle - last_cycle, P);
        last_cycle = cycle;
        if (int'(va) < vmin) vmin = int'(va);
        if (int'(va) > vmax) vmax = int'(va);
        k++;
      end
    end
    check("minimum", vmin, 20);
    check("maximum", vmax, 180);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * N * P + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
