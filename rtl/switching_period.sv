// switching_period: SSVM time base ("switching period" block). It produces vp,
// a sawtooth that counts 0, 1, ..., TS_COUNT (1000) and wraps to 0, so one
// switching period is TS_COUNT+1 steps. The SSVM modulator compares vp with
// the on-times of the switches, which are expressed in the same units.
//
// How it works: a prescaler makes one step every 2*(div+1) clocks, where div
// follows select_ts: 24 ("00"), 11 ("01"), 9 ("10") or 4 ("11"). With a
// 100 MHz clock that is 50, 24, 20 or 10 clocks per step and a switching
// frequency of about 2, 4, 5 or 10 kHz. A new select_ts takes effect at the
// next step, the prescaler restarting from 0.
//
// Interface: clk, synchronous active-high rst (vp to 0), select_ts, vp (16
// bits, registered), and step, high in the clock in which vp advances next.
// Taken from the source design: the four divider values and their
// frequencies, the count to 1000 and the 16-bit output. The clock enable in
// place of a divided clock is this design's own choice.
module switching_period
  import mlc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  ts_sel_e   select_ts,
  output logic      step,
  output logic [15:0] vp
);

  logic [5:0] div_end;
  logic [5:0] div_cnt;

  always_comb begin
    unique case (select_ts)
      TS_2K:   div_end = 6'(2 * (24 + 1) - 1);
      TS_4K:   div_end = 6'(2 * (11 + 1) - 1);
      TS_5K:   div_end = 6'(2 * (9 + 1) - 1);
      default: div_end = 6'(2 * (4 + 1) - 1);
    endcase
  end

  assign step = (div_cnt >= div_end);

  always_ff @(posedge clk) begin
    if (rst) div_cnt <= '0;
    else if (step) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) vp <= '0;
    else if (step) vp <= (vp == 16'(TS_COUNT)) ? '0 : vp + 1'b1;
  end

endmodule
