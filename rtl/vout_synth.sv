// vout_synth: output-voltage reconstruction ("v_abc_out" block). From the gate
// signals of the three legs it computes the voltages an ideal LEVELS-level
// diode-clamped converter with balanced DC-link capacitors would produce, as
// 8-bit words that can drive a DAC for display.
//
// How it works, per leg x:
//  1. Connection functions: F_xj = 1 when the switches show the pattern of
//     leg state j, else 0. State j has switches S_1..S_(LEVELS-1-j) off and
//     S_(LEVELS-j)..S_(LEVELS-1) on; any other pattern is a forbidden state,
//     all F_xj are 0 and the leg counts as 0 V.
//  2. Pole voltage: v_x0 = sum_j F_xj * floor(j*VDC/(LEVELS-1)).
//  3. Phase voltage of a balanced star load:
//       v_a = (2*v_a0 - v_b0 - v_c0) / 3   (and cyclically),
//     an integer division truncated toward zero.
// The outputs are (2*v_a0 - v_b0 - v_c0 + 3*OFFSET) / 3 in 8 bits, i.e. v_x +
// OFFSET: two's complement when OFFSET is 0 (then exactly the truncated
// phase voltage), an unsigned DAC code when OFFSET centres the swing (then
// the numerator is positive and the offset phase voltage is rounded down,
// as a program that adds the offset before converting to an integer does).
//
// Interface: purely combinational. s_x[i] is switch S_(i+1) of leg x
// (s_x[0] the top switch). level_x is the leg state (0..LEVELS-1; 0 for a
// forbidden pattern), v_x0 the pole voltage.
// Taken from the source design: the connection functions, the per-level
// voltages j*VDC/(LEVELS-1) rounded down, the phase-voltage formula, VDC = 96
// and the 8-bit signed result. OFFSET (used for the SSVM display, which adds
// 125) and the level/pole outputs are this design's additions.
module vout_synth
  import mlc_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  parameter int unsigned VDC    = 96,
  parameter int          OFFSET = 0
) (
  input  logic [LEVELS-2:0]         s_a,
  input  logic [LEVELS-2:0]         s_b,
  input  logic [LEVELS-2:0]         s_c,
  output logic [$clog2(LEVELS)-1:0] level_a,
  output logic [$clog2(LEVELS)-1:0] level_b,
  output logic [$clog2(LEVELS)-1:0] level_c,
  output logic [DW-1:0]             va0,
  output logic [DW-1:0]             vb0,
  output logic [DW-1:0]             vc0,
  output logic [DW-1:0]             va_out,
  output logic [DW-1:0]             vb_out,
  output logic [DW-1:0]             vc_out
);

  localparam int unsigned NS = LEVELS - 1;
  localparam int unsigned LW = $clog2(LEVELS);

  // Gate pattern of leg state j: the lowest j switches (highest indices) on.
  function automatic logic [NS-1:0] state_pattern(int j);
    logic [NS-1:0] p;
    for (int i = 0; i < int'(NS); i++) p[i] = (i >= int'(NS) - j);
    return p;
  endfunction

  // Connection functions F_x0..F_x(LEVELS-1) of one leg.
  function automatic logic [LEVELS-1:0] conn(logic [NS-1:0] s);
    logic [LEVELS-1:0] f;
    for (int j = 0; j < int'(LEVELS); j++) f[j] = (s == state_pattern(j));
    return f;
  endfunction

  function automatic int pole_v(logic [LEVELS-1:0] f);
    int v;
    v = 0;
    for (int j = 1; j < int'(LEVELS); j++) if (f[j]) v += (j * int'(VDC)) / int'(NS);
    return v;
  endfunction

  function automatic logic [LW-1:0] leg_state(logic [LEVELS-1:0] f);
    logic [LW-1:0] l;
    l = '0;
    for (int j = 1; j < int'(LEVELS); j++) if (f[j]) l = LW'(j);
    return l;
  endfunction

  logic [LEVELS-1:0] fa, fb, fc;

  always_comb begin
    logic signed [31:0] pa, pb, pc;
    fa = conn(s_a);
    fb = conn(s_b);
    fc = conn(s_c);
    pa = pole_v(fa);
    pb = pole_v(fb);
    pc = pole_v(fc);
    level_a = leg_state(fa);
    level_b = leg_state(fb);
    level_c = leg_state(fc);
    va0 = DW'(pa);
    vb0 = DW'(pb);
    vc0 = DW'(pc);
    va_out = DW'((2 * pa - pb - pc + 3 * OFFSET) / 3);
    vb_out = DW'((2 * pb - pa - pc + 3 * OFFSET) / 3);
    vc_out = DW'((2 * pc - pa - pb + 3 * OFFSET) / 3);
  end

endmodule
