// carrier_gen: triangular carrier generator ("up-down counter" block) for the
// level-shifted carrier PWM of an LEVELS-level converter.
//
// How it works: a prescaler gives one count step every 2*(HALF_DIV+1) clocks.
// An up-down counter d walks 0 -> BAND -> 0, one unit per step, so one carrier
// period is 2*BAND steps. The LEVELS-1 carriers are copies of this triangle
// stacked in bands of height BAND: the carrier in band k (k = 0 at the bottom)
// is k*BAND + d, or k*BAND + (BAND - d) when it is inverted (180 degrees out of
// phase). The technique select decides which carriers are inverted:
//   PD   none (all in phase);
//   POD  the carriers in the lower half of the stack (below the zero axis);
//   APOD every odd band, so neighbouring carriers are always in opposition.
// PWM_SSVM does not use carriers and gives the PD arrangement.
//
// Interface: clk, synchronous active-high rst (counter to 0, counting up).
// carrier[i] is the carrier compared to make switch S_(i+1): carrier[0] is the
// top band, carrier[LEVELS-2] the bottom band (0..BAND). The carriers are
// combinational functions of the registered counter and of mode, so a change
// of mode shows in the same cycle.
//
// Taken from the source design: 8-bit carriers, the up-down counter, bands of
// 50 for the 5-level case (offsets 0, 50, 100, 150), divider end value 150,
// and the in-phase/opposition arrangements of PD, POD and APOD. The source's
// prose gives the triangle a peak of 49 while its counter, as listed, turns
// at 50; this design follows the counter (0..BAND). Which half is inverted
// in POD, which bands in APOD, and the clock enable in place of a divided
// clock are this design's own choices.
module carrier_gen
  import mlc_pkg::*;
#(
  parameter int unsigned LEVELS   = 5,
  parameter int unsigned BAND     = 50,
  parameter int unsigned HALF_DIV = 150
) (
  input  logic          clk,
  input  logic          rst,
  input  pwm_mode_e     mode,
  output logic          step,
  output logic [DW-1:0] carrier [LEVELS-1]
);

  localparam int unsigned NC   = LEVELS - 1;
  localparam int unsigned DIVW = $clog2(2 * (HALF_DIV + 1));

  initial begin
    assert (LEVELS >= 2) else $error("carrier_gen: LEVELS must be at least 2");
    assert (NC * BAND < 2 ** DW) else $error("carrier_gen: carrier stack exceeds %0d bits", DW);
  end

  logic [DIVW-1:0] div_cnt;
  logic [DW-1:0]   d;
  logic            down;

  always_ff @(posedge clk) begin
    if (rst) div_cnt <= '0;
    else if (step) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end
  assign step = (div_cnt == DIVW'(2 * (HALF_DIV + 1) - 1));

  // Up-down counter: turns at BAND and at 0.
  always_ff @(posedge clk) begin
    if (rst) begin
      d    <= '0;
      down <= 1'b0;
    end else if (step) begin
      if (!down) begin
        d <= d + 1'b1;
        if (d == DW'(BAND - 1)) down <= 1'b1;
      end else begin
        d <= d - 1'b1;
        if (d == DW'(1)) down <= 1'b0;
      end
    end
  end

  for (genvar i = 0; i < NC; i++) begin : g_car
    localparam int unsigned K = NC - 1 - i;  // band index from the bottom
    logic inv;
    always_comb begin
      unique case (mode)
        PWM_POD:  inv = (2 * K < NC);
        PWM_APOD: inv = (K % 2 == 1);
        default:  inv = 1'b0;
      endcase
      carrier[i] = DW'(K * BAND) + (inv ? DW'(BAND) - d : d);
    end
  end

endmodule
