// vout_synth_tb: self-checking testbench of vout_synth.
// Instance A: 5 levels, VDC 96, no offset (the carrier-path setting).
// Instance B: 3 levels, VDC 180, offset 125 (the SSVM display setting).
// Instance C: 9 levels, VDC 180, offset 125, where the level voltages
// (multiples of 22.5 rounded down) make the division by 3 inexact, so the
// offset word must be the offset phase voltage rounded down.
// Every combination of legal leg states is applied; pole and phase voltages
// are checked against values computed here from the leg levels, and a few
// forbidden gate patterns must read as level 0.
module vout_synth_tb;
  import mlc_pkg::*;

  logic [3:0] a5, b5, c5;
  logic [2:0] la5, lb5, lc5;
  logic [DW-1:0] pa5, pb5, pc5, oa5, ob5, oc5;
  logic [1:0] a3, b3, c3;
  logic [1:0] la3, lb3, lc3;
  logic [DW-1:0] pa3, pb3, pc3, oa3, ob3, oc3;
  logic [7:0] a9, b9, c9;
  logic [3:0] la9, lb9, lc9;
  logic [DW-1:0] pa9, pb9, pc9, oa9, ob9, oc9;
  int checks = 0, failures = 0;

  vout_synth #(.LEVELS(5), .VDC(96), .OFFSET(0)) dut5 (
    .s_a(a5), .s_b(b5), .s_c(c5), .level_a(la5), .level_b(lb5), .level_c(lc5),
    .va0(pa5), .vb0(pb5), .vc0(pc5), .va_out(oa5), .vb_out(ob5), .vc_out(oc5));
  vout_synth #(.LEVELS(3), .VDC(180), .OFFSET(125)) dut3 (
    .s_a(a3), .s_b(b3), .s_c(c3), .level_a(la3), .level_b(lb3), .level_c(lc3),
    .va0(pa3), .vb0(pb3), .vc0(pc3), .va_out(oa3), .vb_out(ob3), .vc_out(oc3));

  vout_synth #(.LEVELS(9), .VDC(180), .OFFSET(125)) dut9 (
    .s_a(a9), .s_b(b9), .s_c(c9), .level_a(la9), .level_b(lb9), .level_c(lc9),
    .va0(pa9), .vb0(pb9), .vc0(pc9), .va_out(oa9), .vb_out(ob9), .vc_out(oc9));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // gates of leg level j out of nsw switches: S_1 is bit 0
  function automatic logic [7:0] gates(int j, int nsw);
    logic [7:0] g;
    g = '0;
    for (int k = 0; k < j; k++) g[nsw - 1 - k] = 1'b1;
    return g;
  endfunction

  // truncating division by 3, written without relying on the language rule
  function automatic int div3(int x);
    return (x >= 0) ? x / 3 : -((-x) / 3);
  endfunction

  initial begin
    int volt5 [5];
    int volt3 [3];
    volt5 = '{0, 24, 48, 72, 96};
    volt3 = '{0, 90, 180};
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        for (int k = 0; k < 5; k++) begin
          a5 = 4'(gates(i, 4)); b5 = 4'(gates(j, 4)); c5 = 4'(gates(k, 4));
          #1;
          check("level a", int'(la5), i);
          check("level c", int'(lc5), k);
          check("pole a", int'(pa5), volt5[i]);
          check("pole b", int'(pb5), volt5[j]);
          check("va", int'($signed(oa5)), div3(2 * volt5[i] - volt5[j] - volt5[k]));
          check("vb", int'($signed(ob5)), div3(2 * volt5[j] - volt5[i] - volt5[k]));
          check("vc", int'($signed(oc5)), div3(2 * volt5[k] - volt5[i] - volt5[j]));
        end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 3; k++) begin
          a3 = 2'(gates(i, 2)); b3 = 2'(gates(j, 2)); c3 = 2'(gates(k, 2));
          #1;
          check("3L pole a", int'(pa3), volt3[i]);
          check("3L va", int'(oa3), div3(2 * volt3[i] - volt3[j] - volt3[k] + 375));
          check("3L vc", int'(oc3), div3(2 * volt3[k] - volt3[i] - volt3[j] + 375));
        end
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 9; j++)
        for (int k = 0; k < 9; k++) begin
          int vi, vj, vk;
          real x;
          a9 = gates(i, 8); b9 = gates(j, 8); c9 = gates(k, 8);
          #1;
          vi = (i * 180) / 8; vj = (j * 180) / 8; vk = (k * 180) / 8;
          x = real'(2 * vi - vj - vk) / 3.0 + 125.0;
          check("9L level b", int'(lb9), j);
          check("9L pole a", int'(pa9), vi);
          check("9L va", int'(oa9), $rtoi(x));
          x = real'(2 * vj - vi - vk) / 3.0 + 125.0;
          check("9L vb", int'(ob9), $rtoi(x));
        end
    // forbidden patterns: top switch on with a lower one off
    a5 = 4'b0001; b5 = 4'b0000; c5 = 4'b0101;
    #1;
    check("forbidden a level", int'(la5), 0);
    check("forbidden a pole", int'(pa5), 0);
    check("forbidden c pole", int'(pc5), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
