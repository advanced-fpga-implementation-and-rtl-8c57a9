// mlc_pkg: types and constants shared by the multilevel diode-clamped
// converter (DCC) PWM modulators.
//
// The converter has LEVELS output levels per leg and LEVELS-1 switch pairs.
// Gate signals of one leg are carried as a vector indexed 0..LEVELS-2, where
// element i is the switch S_(i+1) of the leg: element 0 is the topmost switch,
// which is on only at the highest level, and the last element is the lowest
// switch, on at every level but 0. A valid leg state is therefore a
// "thermometer" pattern filled from the high index down.
//
// The modulation technique select chooses between the three carrier-based
// methods (phase disposition, phase opposition disposition, alternative phase
// opposition disposition) and simplified space vector modulation (SSVM).
// The 2-bit encoding is this design's own.
package mlc_pkg;

  typedef enum logic [1:0] {
    PWM_PD   = 2'd0,  // all carriers in phase
    PWM_POD  = 2'd1,  // carriers below the zero axis inverted
    PWM_APOD = 2'd2,  // every other carrier inverted
    PWM_SSVM = 2'd3   // simplified space vector modulation
  } pwm_mode_e;

  // Switching-frequency select of the SSVM time base (2/4/5/10 kHz).
  typedef enum logic [1:0] {
    TS_2K  = 2'b00,
    TS_4K  = 2'b01,
    TS_5K  = 2'b10,
    TS_10K = 2'b11
  } ts_sel_e;

  // Width of the reference, carrier and output-voltage words.
  localparam int unsigned DW = 8;

  // Full count of the SSVM switching-period sawtooth (0..TS_COUNT).
  localparam int unsigned TS_COUNT = 1000;

endpackage
