// bmu: branch metric unit for one double-binary symbol.
//
// A branch of the DB trellis is labelled by the input pair z = {A,B} and the
// parity pair {Y,W}, so one symbol has 16 distinct branch metrics, indexed
// gamma[{A,B,Y,W}]. Each is a correlation of the received soft values with
// the branch label plus the a priori LLR of z:
//   gamma = la[z] + (A*ra + B*rb) + (Y*ry + W*rw),    la[0] = 0.
// The systematic and parity partial sums each need one adder (ra+rb, ry+rw)
// and the final metric two more, the two-level adder arrangement of the
// published unit. Metrics are computed on the fly in natural order, without a
// branch metric cache. Combinational; BM_W = 8 bits covers the full range of
// 4-bit soft inputs and 6-bit a priori values. gamma[0] (z = 0, Y = W = 0)
// is zero by construction: it is the reference the other 15 are relative to,
// and is kept as an output so all 16 metrics are indexed alike.
//
// The correlation form of the metric is this design's choice: the source
// only says the metric is built from the received codeword and the a priori
// LLR with a Hamming or Euclidean distance.
module bmu
  import map_pkg::*;
(
  input  sym_t                 sym,
  output logic [15:0][BM_W-1:0] gamma
);
  logic signed [BM_W-1:0] ra, rb, ry, rw;
  logic signed [BM_W-1:0] sys [4];
  logic signed [BM_W-1:0] par [4];
  logic signed [BM_W-1:0] la  [4];

  always_comb begin
    ra = BM_W'($signed(sym.ra));
    rb = BM_W'($signed(sym.rb));
    ry = BM_W'($signed(sym.ry));
    rw = BM_W'($signed(sym.rw));
    sys[0] = '0;  sys[1] = rb;  sys[2] = ra;  sys[3] = ra + rb;
    par[0] = '0;  par[1] = rw;  par[2] = ry;  par[3] = ry + rw;
    la[0]  = '0;
    for (int z = 1; z < 4; z++) la[z] = BM_W'($signed(sym.la[z]));
    for (int i = 0; i < 16; i++) gamma[i] = (la[i / 4] + sys[i / 4]) + par[i % 4];
  end
endmodule
