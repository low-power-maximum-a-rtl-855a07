// lapo: log a posteriori module for one double-binary symbol.
//
// For every one of the 32 trellis transitions s -> n with input z it forms
// alpha[s] + gamma(s,z) + beta[n], takes the maximum over the eight
// transitions of each z (max-log), and outputs the symbol LLRs relative to
// z = 0:  llr[z] = M[z] - M[0], z = 1..3.
//
// alpha is the forward metric of the stage before the symbol, beta the
// backward metric of the stage after it. Because the state metrics wrap
// modulo 2^W, both are first normalised to state 0 (alpha[s] - alpha[0],
// read as a signed W-bit value, which is exact while the metric spread stays
// below 2^(W-1)); the sums are then formed in W+2 bits and the LLRs in W+3
// bits without overflow. Combinational.
//
// Eight of the 32 sums come ready-made from the traceback unit pair on the
// same path: tsum[j][z] is the TBU's regenerated ACSU input "metric plus
// branch metric" for anchor state j, so for those transitions the LAPO only
// adds the metric of the other side.
//   TSUM_BWD = 1 (beta traced): tsum[j][z] = beta[n] + gamma(s,z) for the
//     transitions leaving s = anchor j (states 0 and 4);
//   TSUM_BWD = 0 (alpha traced): tsum[j][z] = alpha[s] + gamma(s,z) for the
//     transitions entering n = anchor j (states 0 and 1).
// A ready-made sum is normalised like the metrics (tsum - beta[0] or
// tsum - alpha[0], signed W bits); this is exact while the normalised metric
// plus the branch metric stays below 2^(W-1) in magnitude, which holds for
// the decoder's widths (spread below about 380, |gamma| <= 64, W = 10).
// With wrapping metrics that normalising subtraction takes the place of the
// branch metric addition, so the reuse saves no adder here; it would in a
// datapath that adds unnormalised metrics.
//
// Reusing the traceback sums follows the source architecture; the max-log
// combination, the normalisation and the output width are this design's
// choices.
module lapo
  import map_pkg::*;
#(
  parameter int unsigned W        = 10,
  parameter bit          TSUM_BWD = 1'b1,
  localparam int unsigned LLR_W = W + 3
) (
  input  logic [7:0][W-1:0]     alpha,
  input  logic [7:0][W-1:0]     beta,
  input  logic [15:0][BM_W-1:0] gamma,
  input  logic [1:0][3:0][W-1:0] tsum,
  output logic [3:1][LLR_W-1:0] llr
);
  logic signed [LLR_W-1:0] an [8];
  logic signed [LLR_W-1:0] bn [8];
  logic signed [LLR_W-1:0] m  [4];
  logic signed [LLR_W-1:0] v;
  logic [W-1:0]            t;
  logic [2:0]              n;

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      t     = alpha[s] - alpha[0];
      an[s] = LLR_W'($signed(t));
      t     = beta[s] - beta[0];
      bn[s] = LLR_W'($signed(t));
    end
    for (int z = 0; z < 4; z++) begin
      m[z] = '0;
      for (int s = 0; s < 8; s++) begin
        n = next_state(3'(s), 2'(z));
        if (TSUM_BWD && s[1:0] == 2'b00) begin
          t = tsum[s[2]][z] - beta[0];
          v = an[s] + LLR_W'($signed(t));
        end else if (!TSUM_BWD && n[2:1] == 2'b00) begin
          t = tsum[n[0]][z] - alpha[0];
          v = LLR_W'($signed(t)) + bn[n];
        end else begin
          v = an[s] + LLR_W'($signed(gamma[{2'(z), parity(3'(s), 2'(z))}])) + bn[n];
        end
        if (s == 0 || v > m[z]) m[z] = v;
      end
    end
    for (int z = 1; z < 4; z++) llr[z] = m[z] - m[0];
  end
endmodule
