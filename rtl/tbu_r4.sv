// tbu_r4: radix-4 traceback unit, the inverse of acsu_r4.
//
// The LUT correction (recomputed from the stored differences) is removed from
// the incoming state metric to recover the maximum. The select bits s1/s0
// pick, through a two-level mux, the difference between A and the winner
// (0, diff[0], diff[1] or diff[2]), so A = maximum + that difference. Then
// B = A - diff[0], C = A - diff[1], D = A - diff[2] (sum[0..3]) and the
// previous state metrics are sum[i] - branch_in[i]. Exact W-bit modular
// arithmetic; combinational. The B, C and D subtractions run in parallel,
// which keeps the path short and balanced.
//
// Mux arrangement and select bits follow the published unit; the LUT
// contents are this design's choice (see map_pkg).
module tbu_r4
  import map_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter bit          USE_LUT = 1'b1
) (
  input  logic [W-1:0]      state_in,
  input  logic [2:0][W-1:0] diff,
  input  logic              s0,
  input  logic              s1,
  input  logic [3:0][W-1:0] branch_in,
  output logic [3:0][W-1:0] sum,
  output logic [3:0][W-1:0] state_out
);
  logic [W-1:0] m, sel_ab, sel_cd, sel, corr;

  always_comb begin
    corr    = USE_LUT ? W'(lut_r4(int'($signed(diff[0])), int'($signed(diff[1])),
                              int'($signed(diff[2])))) : '0;
    m      = state_in - corr;
    sel_ab = s1 ? diff[0] : '0;
    sel_cd = s1 ? diff[2] : diff[1];
    sel    = s0 ? sel_cd : sel_ab;
    sum[0] = m + sel;
    sum[1] = sum[0] - diff[0];
    sum[2] = sum[0] - diff[1];
    sum[3] = sum[0] - diff[2];
    for (int i = 0; i < 4; i++) state_out[i] = sum[i] - branch_in[i];
  end
endmodule
