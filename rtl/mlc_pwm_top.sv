// mlc_pwm_top: PWM controller for a three-phase LEVELS-level diode-clamped
// converter, offering four modulation techniques on one set of gate outputs:
// level-shifted carrier PWM in its PD, POD and APOD arrangements, and
// simplified space vector modulation (SSVM).
//
// Structure:
//   ref_gen          three-phase 50 Hz references, shared by both paths
//   carrier_gen      LEVELS-1 stacked triangular carriers (PD/POD/APOD)
//   pwm_compare      reference-versus-carrier comparators -> carrier gates
//   switching_period SSVM time base, 0..1000 sawtooth, rate from select_ts
//   ssvm_modulator   SSVM: sector, reconstructed reference, triangle type,
//                    durations, pulses, interchange -> SSVM gates
//   vout_synth (x2)  ideal converter output voltages of each path, as 8-bit
//                    words for a DAC (carrier path: VDC 96, two's complement;
//                    SSVM path: VDC 180 plus 125)
// mode selects which path drives s_a/s_b/s_c and the DAC word dac_a. Both
// paths run all the time, so a mode change takes effect at once. m_full = 0
// halves the SSVM references (modulation-index step from 0.8 to 0.4).
// SSVM_SYMMETRIC chooses centred SSVM pulses instead of pulses that all start
// at the beginning of the switching period (see ssvm_modulator).
// The blocks' diagnostic outputs (sample and step strobes, durations,
// triangle type, leg levels and pole voltages) are left unconnected here on
// purpose; testbenches read them inside the blocks.
//
// Interface: one clock (100 MHz assumed for the stated frequencies) and a
// synchronous active-high reset. s_x[i] is switch S_(i+1) of leg x, s_x[0]
// the top switch; the complementary lower switches are the inverses and are
// not brought out. The gate outputs of the SSVM path are two clocks behind
// the references (see ssvm_modulator); those of the carrier path are a
// combinational function of the registered references and carriers.
//
// The source builds each technique as a separate FPGA image and runs the SSVM
// steps in software on the embedded processor, with GPIO registers between
// processor and logic. Putting both paths side by side behind a technique
// select, the SSVM in logic, and the offset-binary DAC word of the carrier
// path (two's complement plus 128) are this design's own choices.
module mlc_pwm_top
  import mlc_pkg::*;
#(
  parameter int unsigned LEVELS       = 5,
  parameter int unsigned BAND         = 50,
  parameter int unsigned CAR_HALF_DIV = 150,
  parameter int unsigned REF_HALF_DIV = 3332,
  parameter int unsigned VDC_CB       = 96,
  parameter int unsigned VDC_SSVM     = 180,
  parameter int          SSVM_OFFSET  = 125,
  parameter bit          SSVM_SYMMETRIC = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  pwm_mode_e         mode,
  input  ts_sel_e           select_ts,
  input  logic              m_full,
  output logic [DW-1:0]     va_ref,
  output logic [DW-1:0]     vb_ref,
  output logic [DW-1:0]     vc_ref,
  output logic [15:0]       vp,
  output logic [2:0]        sector,
  output logic [LEVELS-2:0] s_a,
  output logic [LEVELS-2:0] s_b,
  output logic [LEVELS-2:0] s_c,
  output logic [DW-1:0]     cb_va_out,
  output logic [DW-1:0]     cb_vb_out,
  output logic [DW-1:0]     cb_vc_out,
  output logic [DW-1:0]     ssvm_va_out,
  output logic [DW-1:0]     ssvm_vb_out,
  output logic [DW-1:0]     ssvm_vc_out,
  output logic [DW-1:0]     dac_a
);

  // ---- references ----------------------------------------------------------
  ref_gen #(.HALF_DIV(REF_HALF_DIV)) u_ref (
    .clk, .rst, .sample_stb(), .va(va_ref), .vb(vb_ref), .vc(vc_ref)
  );

  // ---- carrier-based path ----------------------------------------------------
  logic [DW-1:0]     carrier [LEVELS-1];
  logic [LEVELS-2:0] cb_a, cb_b, cb_c;

  carrier_gen #(.LEVELS(LEVELS), .BAND(BAND), .HALF_DIV(CAR_HALF_DIV)) u_car (
    .clk, .rst, .mode, .step(), .carrier
  );

  pwm_compare #(.LEVELS(LEVELS)) u_cmp (
    .va(va_ref), .vb(vb_ref), .vc(vc_ref), .carrier,
    .s_a(cb_a), .s_b(cb_b), .s_c(cb_c)
  );

  vout_synth #(.LEVELS(LEVELS), .VDC(VDC_CB), .OFFSET(0)) u_cb_vout (
    .s_a(cb_a), .s_b(cb_b), .s_c(cb_c),
    .level_a(), .level_b(), .level_c(), .va0(), .vb0(), .vc0(),
    .va_out(cb_va_out), .vb_out(cb_vb_out), .vc_out(cb_vc_out)
  );

  // ---- SSVM path -------------------------------------------------------------
  logic [LEVELS-2:0] sv_a, sv_b, sv_c;

  switching_period u_ts (
    .clk, .rst, .select_ts, .step(), .vp
  );

  ssvm_modulator #(.LEVELS(LEVELS), .VDC(VDC_SSVM), .SYMMETRIC(SSVM_SYMMETRIC)) u_ssvm (
    .clk, .rst, .va(va_ref), .vb(vb_ref), .vc(vc_ref), .m_full, .vp,
    .sector, .delta2(), .t1(), .t2(), .t3(),
    .s_a(sv_a), .s_b(sv_b), .s_c(sv_c)
  );

  vout_synth #(.LEVELS(LEVELS), .VDC(VDC_SSVM), .OFFSET(SSVM_OFFSET)) u_sv_vout (
    .s_a(sv_a), .s_b(sv_b), .s_c(sv_c),
    .level_a(), .level_b(), .level_c(), .va0(), .vb0(), .vc0(),
    .va_out(ssvm_va_out), .vb_out(ssvm_vb_out), .vc_out(ssvm_vc_out)
  );

  // ---- technique select ------------------------------------------------------
  always_comb begin
    if (mode == PWM_SSVM) begin
      s_a   = sv_a;
      s_b   = sv_b;
      s_c   = sv_c;
      dac_a = ssvm_va_out;
    end else begin
      s_a   = cb_a;
      s_b   = cb_b;
      s_c   = cb_c;
      dac_a = cb_va_out + DW'(128);
    end
  end

  // Every leg must always be in one of its LEVELS permitted states.
  function automatic logic legal(logic [LEVELS-2:0] s);
    logic ok;
    ok = 1'b1;
    for (int i = 1; i < int'(LEVELS) - 1; i++) if (s[i - 1] && !s[i]) ok = 1'b0;
    return ok;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst) begin
      a_legal_states: assert (legal(s_a) && legal(s_b) && legal(s_c))
        else $error("mlc_pwm_top: forbidden leg state");
    end
  end

endmodule
