// ssvm_modulator: simplified space vector modulation (SSVM) for an
// LEVELS-level diode-clamped converter. It turns the three references into the
// gate signals of the three legs, doing all of the space-vector work in the
// first sector only.
//
// How it works (one pass per clock, in the order of the SSVM flow):
//  1. Sector identification: the sector 1..6 follows from the order of
//     va, vb, vc (va>=vb>=vc is 1, vb>=va>=vc 2, vb>=vc>=va 3, vc>=vb>=va 4,
//     vc>=va>=vb 5, va>=vc>=vb 6; ties go to the first of 1, 6, 2, 3, 4, 5).
//  2. Reconstructed reference: the references are permuted into
//     (Ua, Ub, Uc) with Ua >= Ub >= Uc, which places U* in sector 1.
//  3. Triangle type: in g-h coordinates Ug = (LEVELS-1)(Ua-Ub)/VDC and
//     Uh = (LEVELS-1)(Ub-Uc)/VDC. With G, H their integer parts and fg, fh
//     their fractions, U* is in an upper triangle when fg + fh < 1 and in a
//     lower one otherwise. Everything is kept exact in integers: the
//     fractions are remainders of a division by VDC (2*VDC at full index).
//  4. Durations, in units of the time base (TS_COUNT per period):
//     upper: t2 = Ts*fg,      t3 = Ts*fh,      t1 = Ts - t2 - t3
//     lower: t2 = Ts*(1-fh),  t3 = Ts*(1-fg),  t1 = Ts - t2 - t3
//     with v2 = (G+1, H), v3 = (G, H+1), v1 = (G, H) (upper) or
//     (G+1, H+1) (lower).
//  5. Pulses: each vector is applied in its first redundant state, where the
//     leg of Ua sits at the top level: levels (LEVELS-1, LEVELS-1-g,
//     LEVELS-1-g-h). Switch S_(i+1) of a leg is on when the leg's level is at
//     least LEVELS-1-i, so its on-time is the sum of the durations of the
//     vectors in which that holds. With SYMMETRIC = 0 the switch is on while
//     vp < on-time: pulses start together at the beginning of the period and
//     the vector with the highest levels comes first. With SYMMETRIC = 1 the
//     switch is on while TS - on-time <= 2*vp < TS + on-time: each pulse is
//     centred in the period, so the vectors run from the lowest to the highest
//     levels and back (431 -> 432 -> 442 -> 442 -> 432 -> 431 in the worked
//     5-level example). The pulse widths are the same either way.
//  6. Interchange: the sector-1 pulses are given back to the physical legs,
//     the inverse of the permutation of step 2.
// m_full = 0 halves the references (a modulation-index step to half).
// Points outside the hexagon (G + H > LEVELS-2) are not handled by the method;
// there the levels are clamped at 0.
//
// Interface and timing: clk, synchronous active-high rst. Steps 1-4 and the
// on-times are registered (one clock from va/vb/vc/m_full to sector, delta2,
// t1..t3); the gates are registered one clock after that from the registered
// on-times and the current vp. vp comes from the switching_period time base.
//
// Taken from the source design: the six steps, the sector table, the
// permutation and interchange tables, the triangle test, the duration
// formulas, the first redundant state, the comparison "vp < on-time" of the
// processor implementation (the default), the symmetrical ascending and
// descending sequence the method itself describes (SYMMETRIC = 1), the time
// base of 1000, VDC = 180 and the halving for the reduced index. The
// source runs these steps as software on an embedded processor and moves
// the data through GPIO registers; here they are logic. The exact integer
// arithmetic, the clamping outside the hexagon and the two pipeline stages
// are this design's own.
module ssvm_modulator
  import mlc_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  parameter int unsigned VDC    = 180,
  parameter bit          SYMMETRIC = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DW-1:0]     va,
  input  logic [DW-1:0]     vb,
  input  logic [DW-1:0]     vc,
  input  logic              m_full,
  input  logic [15:0]       vp,
  output logic [2:0]        sector,
  output logic              delta2,
  output logic [15:0]       t1,
  output logic [15:0]       t2,
  output logic [15:0]       t3,
  output logic [LEVELS-2:0] s_a,
  output logic [LEVELS-2:0] s_b,
  output logic [LEVELS-2:0] s_c
);

  localparam int NL  = int'(LEVELS) - 1;      // switches per leg
  localparam int TS  = int'(TS_COUNT);

  typedef logic [15:0] ontime_t [LEVELS-1];
  typedef logic signed [31:0] s32_t;            // 4-state integer

  // ---- combinational steps 1-5 -------------------------------------------
  logic [2:0]  sec_c;
  logic        d2_c;
  logic [15:0] d1_c, d2t_c, d3_c;
  ontime_t     on_c [3];                       // [U leg] on-time per switch

  function automatic s32_t clamp0(s32_t v);
    return (v < 0) ? 0 : v;
  endfunction

  always_comb begin
    s32_t a, b, c, ua, ub, uc, div, xg, xh, g, h, fg, fh;
    s32_t vg [3];
    s32_t vh [3];
    s32_t dur [3];
    s32_t lvl [3][3];                          // [vector][U leg a,b,c]
    a = int'(va);
    b = int'(vb);
    c = int'(vc);

    // 1. sector
    if      (a >= b && b >= c) sec_c = 3'd1;
    else if (a >= c && c >= b) sec_c = 3'd6;
    else if (b >= a && a >= c) sec_c = 3'd2;
    else if (b >= c && c >= a) sec_c = 3'd3;
    else if (c >= b && b >= a) sec_c = 3'd4;
    else                       sec_c = 3'd5;

    // 2. reconstructed reference
    unique case (sec_c)
      3'd1:    begin ua = a; ub = b; uc = c; end
      3'd2:    begin ua = b; ub = a; uc = c; end
      3'd3:    begin ua = b; ub = c; uc = a; end
      3'd4:    begin ua = c; ub = b; uc = a; end
      3'd5:    begin ua = c; ub = a; uc = b; end
      default: begin ua = a; ub = c; uc = b; end
    endcase

    // 3. g-h components, integer parts and fractions (fractions over div)
    div = m_full ? 2 * int'(VDC) : 4 * int'(VDC);
    xg  = 2 * NL * (ua - ub);
    xh  = 2 * NL * (ub - uc);
    g   = xg / div;
    h   = xh / div;
    fg  = xg % div;
    fh  = xh % div;
    d2_c = (fg + fh >= div);

    // 4. durations
    if (!d2_c) begin
      dur[1] = (TS * fg) / div;
      dur[2] = (TS * fh) / div;
      vg[0] = g;     vh[0] = h;
    end else begin
      dur[1] = (TS * (div - fh)) / div;
      dur[2] = (TS * (div - fg)) / div;
      vg[0] = g + 1; vh[0] = h + 1;
    end
    dur[0] = TS - dur[1] - dur[2];
    vg[1] = g + 1; vh[1] = h;
    vg[2] = g;     vh[2] = h + 1;
    d1_c  = 16'(dur[0]);
    d2t_c = 16'(dur[1]);
    d3_c  = 16'(dur[2]);

    // 5. first redundant state of each vector and switch on-times
    for (int v = 0; v < 3; v++) begin
      lvl[v][0] = NL;
      lvl[v][1] = clamp0(NL - vg[v]);
      lvl[v][2] = clamp0(NL - vg[v] - vh[v]);
    end
    for (int x = 0; x < 3; x++) begin
      for (int i = 0; i < NL; i++) begin
        s32_t sum;
        sum = 0;
        for (int v = 0; v < 3; v++) if (lvl[v][x] >= NL - i) sum += dur[v];
        on_c[x][i] = 16'(sum);
      end
    end
  end

  // ---- stage 1 registers ---------------------------------------------------
  ontime_t on_r [3];

  always_ff @(posedge clk) begin
    if (rst) begin
      sector <= 3'd1;
      delta2 <= 1'b0;
      t1 <= 16'(TS);
      t2 <= '0;
      t3 <= '0;
      for (int x = 0; x < 3; x++) for (int i = 0; i < NL; i++) on_r[x][i] <= '0;
    end else begin
      sector <= sec_c;
      delta2 <= d2_c;
      t1 <= d1_c;
      t2 <= d2t_c;
      t3 <= d3_c;
      on_r <= on_c;
    end
  end

  // ---- stage 2: pulses and interchange --------------------------------------
  logic [LEVELS-2:0] pu [3];   // pulses of U legs a, b, c

  always_comb begin
    for (int x = 0; x < 3; x++)
      for (int i = 0; i < NL; i++) begin
        if (SYMMETRIC)
          pu[x][i] = ({1'b0, vp, 1'b0} + {2'b00, on_r[x][i]} >= 18'(TS)) &&
                     ({1'b0, vp, 1'b0} < 18'(TS) + {2'b00, on_r[x][i]});
        else
          pu[x][i] = (vp < on_r[x][i]);
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_a <= '0;
      s_b <= '0;
      s_c <= '0;
    end else begin
      unique case (sector)
        3'd1:    begin s_a <= pu[0]; s_b <= pu[1]; s_c <= pu[2]; end
        3'd2:    begin s_a <= pu[1]; s_b <= pu[0]; s_c <= pu[2]; end
        3'd3:    begin s_a <= pu[2]; s_b <= pu[0]; s_c <= pu[1]; end
        3'd4:    begin s_a <= pu[2]; s_b <= pu[1]; s_c <= pu[0]; end
        3'd5:    begin s_a <= pu[1]; s_b <= pu[2]; s_c <= pu[0]; end
        default: begin s_a <= pu[0]; s_b <= pu[2]; s_c <= pu[1]; end
      endcase
    end
  end

endmodule
