// acsu_r4: radix-4 add-compare-select unit with difference-metric output.
//
// Four front adders form the candidates A..D. A comparator performs the six
// pairwise subtractions in parallel and derives two select bits: s0 = 1 when
// the (C,D) pair holds the maximum, s1 picks the larger member of the winning
// pair. The maximum is chosen by a two-level mux (s1 on the first level, s0
// on the second) and corrected by the LUT.
//
// The stored differences are all relative to A:
//   diff[0] = A - B, diff[1] = A - C, diff[2] = A - D,
// plus s0 and s1, so a traceback unit (tbu_r4) can first rebuild A from the
// maximum and then B, C, D. W-bit modular arithmetic; combinational.
//
// Comparator, muxes, select bits and 8-bit width follow the published unit.
// The LUT contents are this design's choice and give the same correction as
// acsu_r22 for the same four candidates. Ties select the lower input.
module acsu_r4
  import map_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter bit          USE_LUT = 1'b1
) (
  input  logic [3:0][W-1:0] state_in,
  input  logic [3:0][W-1:0] branch_in,
  output logic [W-1:0]      state_out,
  output logic [2:0][W-1:0] diff,
  output logic              s0,
  output logic              s1
);
  logic [3:0][W-1:0] c;
  logic [W-1:0]      d_bc, d_bd, d_cd, m_ab, m_cd, m_all, corr;
  logic              ge_ab, ge_ac, ge_ad, ge_bc, ge_bd, ge_cd, top_wins;

  always_comb begin
    for (int i = 0; i < 4; i++) c[i] = state_in[i] + branch_in[i];
    // six parallel subtractions
    diff[0] = c[0] - c[1];
    diff[1] = c[0] - c[2];
    diff[2] = c[0] - c[3];
    d_bc    = c[1] - c[2];
    d_bd    = c[1] - c[3];
    d_cd    = c[2] - c[3];
    ge_ab = ~diff[0][W-1];
    ge_ac = ~diff[1][W-1];
    ge_ad = ~diff[2][W-1];
    ge_bc = ~d_bc[W-1];
    ge_bd = ~d_bd[W-1];
    ge_cd = ~d_cd[W-1];
    top_wins = ge_ab ? (ge_ac & ge_ad) : (ge_bc & ge_bd);
    s0 = ~top_wins;
    s1 = top_wins ? ~ge_ab : ~ge_cd;
    m_ab  = s1 ? c[1] : c[0];
    m_cd  = s1 ? c[3] : c[2];
    m_all = s0 ? m_cd : m_ab;
    corr   = USE_LUT ? W'(lut_r4(int'($signed(diff[0])), int'($signed(diff[1])),
                             int'($signed(diff[2])))) : '0;
    state_out = m_all + corr;
  end
endmodule
