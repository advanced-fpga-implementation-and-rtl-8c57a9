// pwm_compare: comparison stage of the carrier-based PWM. Every phase
// reference is compared with every carrier:
//   s_x[i] = 1 when v_x > carrier[i], else 0      (x = a, b, c)
// With the carriers stacked in disjoint bands, the switches of one leg always
// form a valid thermometer pattern, and the number of switches that are on is
// the level of that leg.
//
// Interface: purely combinational. carrier[i] belongs to switch S_(i+1)
// (carrier[0] is the top band). The gate vectors use the same indexing.
// Taken from the source design: the strict "greater than" comparison of
// unsigned 8-bit words, one comparator per phase and carrier. Generalising
// from four carriers to LEVELS-1 is this design's own.
module pwm_compare
  import mlc_pkg::*;
#(
  parameter int unsigned LEVELS = 5
) (
  input  logic [DW-1:0]     va,
  input  logic [DW-1:0]     vb,
  input  logic [DW-1:0]     vc,
  input  logic [DW-1:0]     carrier [LEVELS-1],
  output logic [LEVELS-2:0] s_a,
  output logic [LEVELS-2:0] s_b,
  output logic [LEVELS-2:0] s_c
);

  always_comb begin
    for (int i = 0; i < int'(LEVELS) - 1; i++) begin
      s_a[i] = (va > carrier[i]);
      s_b[i] = (vb > carrier[i]);
      s_c[i] = (vc > carrier[i]);
    end
  end

endmodule
