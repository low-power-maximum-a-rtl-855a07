// nrp: natural recursion processor for the eight DB state metrics.
//
// Eight ACSUs, one per state, update the state metric register once per
// enabled cycle. With BWD = 0 the unit runs the forward (alpha) recursion,
// state s taking its four predecessors; with BWD = 1 it runs the backward
// (beta) recursion over the four successors. Input z of each ACSU carries the
// neighbour reached with input symbol z and the branch metric of that
// transition (sign-extended to W bits).
//
// The difference metrics (and, for the radix-4 structure, the select bits)
// of the two anchor-state ACSUs are output for the state metric cache: six
// differences describe one trellis stage. `load` writes the initial metrics
// (the alpha_in / beta_in mux). sm_q is the current stage's metrics, sm_d the
// next stage's (combinational).
//
// RADIX4 selects the ACSU type (0: radix-2*2, 1: radix-4). The NRP built
// from ACSUs, fed back through a register and loaded from an initial-metric
// mux, and the storage of six differences per stage follow the source
// architecture. One ACSU per state, one stage per cycle, the anchor choice
// and the reset (register cleared) are this design's choices.
module nrp
  import map_pkg::*;
#(
  parameter int unsigned W       = 10,
  parameter bit          BWD     = 1'b0,
  parameter bit          RADIX4  = 1'b0,
  parameter bit          USE_LUT = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [7:0][W-1:0]      init,
  input  logic                   en,
  input  logic [15:0][BM_W-1:0]  gamma,
  output logic [7:0][W-1:0]      sm_q,
  output logic [7:0][W-1:0]      sm_d,
  output logic [1:0][2:0][W-1:0] dm,     // differences of the two anchors
  output logic [1:0][1:0]        sel     // {s1,s0} of the two anchors (radix-4)
);
  logic [7:0][3:0][W-1:0] st_in, br_in;
  logic [7:0][2:0][W-1:0] diff;
  logic [7:0][1:0]        s10;

  always_comb begin
    for (int s = 0; s < 8; s++)
      for (int z = 0; z < 4; z++) begin
        st_in[s][z] = sm_q[nbr(BWD, 3'(s), 2'(z))];
        br_in[s][z] = W'($signed(gamma[bm_sel(BWD, 3'(s), 2'(z))]));
      end
  end

  for (genvar s = 0; s < 8; s++) begin : g_acs
    if (RADIX4) begin : g_r4
      acsu_r4 #(.W(W), .USE_LUT(USE_LUT)) u_acsu (
        .state_in (st_in[s]), .branch_in(br_in[s]), .state_out(sm_d[s]),
        .diff(diff[s]), .s0(s10[s][0]), .s1(s10[s][1]));
    end else begin : g_r22
      acsu_r22 #(.W(W), .USE_LUT(USE_LUT)) u_acsu (
        .state_in (st_in[s]), .branch_in(br_in[s]), .state_out(sm_d[s]),
        .diff(diff[s]));
      assign s10[s] = 2'b00;
    end
  end

  always_comb begin
    for (int j = 0; j < 2; j++) begin
      dm[j]  = diff[anchor(BWD, j[0])];
      sel[j] = s10[anchor(BWD, j[0])];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sm_q <= '0;
    else if (load) sm_q <= init;
    else if (en)   sm_q <= sm_d;
  end
endmodule
