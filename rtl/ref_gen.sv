// ref_gen: three-phase sinusoidal reference generator ("voltage generation"
// block). It produces the 8-bit references va, vb, vc that both the
// carrier-based modulator and the SSVM modulator follow.
//
// How it works: one period of a sine is held in an N_SAMPLES-entry table,
//   SIN_TAB[i] = round(AMP * (1 + sin(2*pi*i/N_SAMPLES))),   0 <= SIN_TAB <= 2*AMP
// computed at elaboration (no data file). Three read pointers walk the table
// at the same rate; phase b starts at PHASE_B_START (about 240 degrees ahead,
// i.e. 120 degrees behind a) and phase c at PHASE_C_START (about 120 degrees
// ahead). Each output is the table value plus OFFSET, so with the defaults the
// references swing between 20 and 180. A prescaler gives one sample step every
// 2*(HALF_DIV+1) clocks, the period of the divided clock of the original
// design; with 300 samples and a 100 MHz clock, HALF_DIV = 3332 gives 50 Hz.
//
// Interface: clk, synchronous active-high rst. va/vb/vc are registered and
// change one clock after a sample step; sample_stb is high for that one clock
// (the clock in which the new values are loaded).
//
// Taken from the source design: 300 samples, table peak 160, offset 20, start
// pointers 0/199/99, 8-bit unsigned outputs, 50 Hz. This design's own choices:
// the divider end value 3332 (the source prints none) and a clock enable in
// place of a divided clock, so the whole block runs on one clock.
module ref_gen
  import mlc_pkg::*;
#(
  parameter int unsigned N_SAMPLES     = 300,
  parameter int unsigned AMP           = 80,
  parameter int unsigned OFFSET        = 20,
  parameter int unsigned PHASE_B_START = 199,
  parameter int unsigned PHASE_C_START = 99,
  parameter int unsigned HALF_DIV      = 3332
) (
  input  logic          clk,
  input  logic          rst,
  output logic          sample_stb,
  output logic [DW-1:0] va,
  output logic [DW-1:0] vb,
  output logic [DW-1:0] vc
);

  localparam int unsigned IW = $clog2(N_SAMPLES);
  localparam int unsigned DIVW = $clog2(2 * (HALF_DIV + 1));

  typedef logic [DW-1:0] tab_t [N_SAMPLES];

  function automatic tab_t gen_tab();
    tab_t t;
    for (int i = 0; i < int'(N_SAMPLES); i++) begin
      real s;
      s = real'(AMP) * (1.0 + $sin(2.0 * 3.14159265358979 * real'(i) / real'(N_SAMPLES)));
      t[i] = DW'(int'(s));  // int'() of a real rounds to nearest
    end
    return t;
  endfunction

  localparam tab_t SIN_TAB = gen_tab();

  logic [DIVW-1:0] div_cnt;
  logic            step;
  logic [IW-1:0]   ia, ib, ic;

  // Sample-rate prescaler: one step every 2*(HALF_DIV+1) clocks.
  always_ff @(posedge clk) begin
    if (rst) div_cnt <= '0;
    else if (step) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end
  assign step = (div_cnt == DIVW'(2 * (HALF_DIV + 1) - 1));

  function automatic logic [IW-1:0] next_idx(logic [IW-1:0] i);
    return (i == IW'(N_SAMPLES - 1)) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ia <= '0;
      ib <= IW'(PHASE_B_START);
      ic <= IW'(PHASE_C_START);
      va <= '0;
      vb <= '0;
      vc <= '0;
      sample_stb <= 1'b0;
    end else begin
      sample_stb <= step;
      if (step) begin
        va <= SIN_TAB[ia] + DW'(OFFSET);
        vb <= SIN_TAB[ib] + DW'(OFFSET);
        vc <= SIN_TAB[ic] + DW'(OFFSET);
        ia <= next_idx(ia);
        ib <= next_idx(ib);
        ic <= next_idx(ic);
      end
    end
  end

endmodule
