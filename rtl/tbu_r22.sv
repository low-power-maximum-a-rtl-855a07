// tbu_r22: radix-2*2 traceback unit, the inverse of acsu_r22.
//
// Given the state metric that an acsu_r22 produced and the three differences
// it stored, the unit removes the LUT correction (recomputed from the same
// differences) to get the selected maximum, then walks the compare tree
// backwards: the sign of diff[2] says which pair won, so the losing pair's
// maximum is the winner's minus/plus diff[2]; the signs of diff[0] and
// diff[1] do the same inside each pair. This yields the four candidates
// A..D (sum[0..3]); subtracting the branch metrics gives the four previous
// state metrics. Because every step is exact W-bit modular arithmetic the
// regenerated metrics equal the ones the ACSU consumed, bit for bit.
//
// sum[] are also the values a LAPO can reuse. Purely combinational. The mux
// and adder/subtractor arrangement follows the published unit; the LUT
// contents are this design's choice (see map_pkg).
module tbu_r22
  import map_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter bit          USE_LUT = 1'b1
) (
  input  logic [W-1:0]      state_in,
  input  logic [2:0][W-1:0] diff,
  input  logic [3:0][W-1:0] branch_in,
  output logic [3:0][W-1:0] sum,
  output logic [3:0][W-1:0] state_out
);
  logic [W-1:0] m, m_ab, m_cd, corr;

  always_comb begin
    corr  = USE_LUT ? W'(lut_r22(int'($signed(diff[0])), int'($signed(diff[1])),
                             int'($signed(diff[2])))) : '0;
    m    = state_in - corr;
    // pair maxima: sign 0 means the (A,B) pair won
    m_ab = diff[2][W-1] ? m + diff[2] : m;
    m_cd = diff[2][W-1] ? m : m - diff[2];
    sum[0] = diff[0][W-1] ? m_ab + diff[0] : m_ab;
    sum[1] = diff[0][W-1] ? m_ab : m_ab - diff[0];
    sum[2] = diff[1][W-1] ? m_cd + diff[1] : m_cd;
    sum[3] = diff[1][W-1] ? m_cd : m_cd - diff[1];
    for (int i = 0; i < 4; i++) state_out[i] = sum[i] - branch_in[i];
  end
endmodule
