// switching_period_tb: self-checking testbench of switching_period.
// For each of the four frequency selects it follows vp through more than one
// full sawtooth and checks that vp only ever steps by one or wraps from 1000
// to 0, that the clocks between steps match the select (50, 24, 20, 10), and
// that a whole period lasts 1001 steps, i.e. 50050, 24024, 20020 and 10010
// clocks (2, 4.16, 5 and 10 kHz at 100 MHz).
module switching_period_tb;
  import mlc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  ts_sel_e sel;
  logic step;
  logic [15:0] vp;
  int checks = 0, failures = 0;

  switching_period dut (.clk, .rst, .select_ts(sel), .step, .vp);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int clocks_per_step [4];
    clocks_per_step = '{50, 24, 20, 10};
    for (int s = 0; s < 4; s++) begin
      int prev, cyc, last_change, wraps, first_wrap_cyc;
      sel = ts_sel_e'(s);
      rst <= 1'b1;
      repeat (2) @(posedge clk);
      rst <= 1'b0;
      @(posedge clk);
      #1;
      check("vp after reset", int'(vp), 0);
      prev = 0; cyc = 0; last_change = 0; wraps = 0; first_wrap_cyc = 0;
      while (wraps < 2) begin
        @(posedge clk);
        cyc++;
        #1;
        if (int'(vp) != prev) begin
          if (prev == 1000) begin
            check("wrap to 0", int'(vp), 0);
            wraps++;
            if (wraps == 1) first_wrap_cyc = cyc;
            else check("period in clocks", cyc - first_wrap_cyc, 1001 * clocks_per_step[s]);
          end else begin
            check("step by one", int'(vp), prev + 1);
          end
          if (last_change != 0) check("clocks per step", cyc - last_change, clocks_per_step[s]);
          last_change = cyc;
          prev = int'(vp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (350000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
