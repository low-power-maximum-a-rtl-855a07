// acsu_r22: radix-2*2 add-compare-select unit with difference-metric output.
//
// Four front adders form the candidates A..D = state_in[i] + branch_in[i].
// Two radix-2 compare-select units pick max(A,B) and max(C,D); a third picks
// the larger of the two. The sign bit of each subtraction drives its mux
// (sign 0 selects the upper input). A LUT driven by the three differences
// adds the log-MAP correction to the selected maximum.
//
// Outputs are the new state metric and the three differences
//   diff[0] = A - B, diff[1] = C - D, diff[2] = max(A,B) - max(C,D),
// which a traceback unit (tbu_r22) uses to regenerate A..D later. All
// arithmetic is W-bit two's complement with wrap-around (modulo
// normalisation), so a difference has the same width as a state metric.
// Purely combinational.
//
// The structure (adders, three radix-2 CSUs, LUT) and the 8-bit width follow
// the published unit; the second difference is taken between C and D as that
// unit's drawing shows. The LUT contents and USE_LUT (0 = max-log) are this
// design's choice.
module acsu_r22
  import map_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter bit          USE_LUT = 1'b1
) (
  input  logic [3:0][W-1:0] state_in,
  input  logic [3:0][W-1:0] branch_in,
  output logic [W-1:0]      state_out,
  output logic [2:0][W-1:0] diff
);
  logic [3:0][W-1:0] c;          // candidates A, B, C, D
  logic [W-1:0]      m_ab, m_cd, m_all, corr;

  always_comb begin
    for (int i = 0; i < 4; i++) c[i] = state_in[i] + branch_in[i];
    diff[0] = c[0] - c[1];
    m_ab    = diff[0][W-1] ? c[1] : c[0];
    diff[1] = c[2] - c[3];
    m_cd    = diff[1][W-1] ? c[3] : c[2];
    diff[2] = m_ab - m_cd;
    m_all   = diff[2][W-1] ? m_cd : m_ab;
    corr     = USE_LUT ? W'(lut_r22(int'($signed(diff[0])), int'($signed(diff[1])),
                                int'($signed(diff[2])))) : '0;
    state_out = m_all + corr;
  end
endmodule
