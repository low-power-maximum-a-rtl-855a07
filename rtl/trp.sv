// trp: traceback recursion processor.
//
// Two traceback units regenerate the eight state metrics of the neighbouring
// trellis stage from the current stage's metrics, one stored stage of
// difference metrics and the branch metrics of that stage. Unit j starts from
// the metric of anchor state j; its four outputs are the anchor's four
// neighbours, and the two neighbour sets cover all eight states.
//
// BWD = 0 traces forward metrics backwards in time (alpha[k+1] -> alpha[k]);
// BWD = 1 traces backward metrics forwards in time (beta[k] -> beta[k+1]).
// cur is the stage being traced from: `seed` when seed_sel = 1 (the first
// step, taking the other path's recursion result), otherwise the unit's own
// register. nxt is the regenerated stage, combinational, and is registered
// when en = 1. The sum outputs (regenerated state metric plus branch metric
// of the eight anchor transitions) are passed to the LAPO of the same path.
//
// RADIX4 selects the TBU type and must match the NRP that wrote the cache.
// Two TBUs per TRP and the seeding from the other path at the middle of the
// window follow the source architecture; the anchor states and the register
// organisation are this design's choices.
module trp
  import map_pkg::*;
#(
  parameter int unsigned W       = 10,
  parameter bit          BWD     = 1'b0,
  parameter bit          RADIX4  = 1'b0,
  parameter bit          USE_LUT = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   seed_sel,
  input  logic [7:0][W-1:0]      seed,
  input  logic                   en,
  input  logic [1:0][2:0][W-1:0] dm,
  input  logic [1:0][1:0]        sel,
  input  logic [15:0][BM_W-1:0]  gamma,
  output logic [7:0][W-1:0]      cur,
  output logic [7:0][W-1:0]      nxt,
  output logic [1:0][3:0][W-1:0] sum
);
  logic [7:0][W-1:0]      q;
  logic [1:0][W-1:0]      st_in;
  logic [1:0][3:0][W-1:0] br_in, st_out;

  assign cur = seed_sel ? seed : q;

  always_comb begin
    for (int j = 0; j < 2; j++) begin
      st_in[j] = cur[anchor(BWD, j[0])];
      for (int z = 0; z < 4; z++)
        br_in[j][z] = W'($signed(gamma[bm_sel(BWD, anchor(BWD, j[0]), 2'(z))]));
    end
  end

  for (genvar j = 0; j < 2; j++) begin : g_tbu
    if (RADIX4) begin : g_r4
      tbu_r4 #(.W(W), .USE_LUT(USE_LUT)) u_tbu (
        .state_in(st_in[j]), .diff(dm[j]), .s0(sel[j][0]), .s1(sel[j][1]),
        .branch_in(br_in[j]), .sum(sum[j]), .state_out(st_out[j]));
    end else begin : g_r22
      tbu_r22 #(.W(W), .USE_LUT(USE_LUT)) u_tbu (
        .state_in(st_in[j]), .diff(dm[j]),
        .branch_in(br_in[j]), .sum(sum[j]), .state_out(st_out[j]));
    end
  end

  always_comb begin
    nxt = '0;
    for (int j = 0; j < 2; j++)
      for (int z = 0; z < 4; z++)
        nxt[nbr(BWD, anchor(BWD, j[0]), 2'(z))] = st_out[j][z];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= nxt;
  end
endmodule
