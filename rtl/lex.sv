// lex: log-extrinsic module.
//
// Removes from each a posteriori symbol LLR the information the decoder was
// given about that symbol, the a priori LLR and the systematic channel part:
//   ext[z] = llr[z] - la[z] - sys[z],  sys[1] = rb, sys[2] = ra,
//   sys[3] = ra + rb   (z = {A,B}),
// and saturates the result to the LA_W-bit a priori format so it can be fed
// to the other constituent decoder. Combinational. Saturation and the
// absence of a scaling factor are this design's choices.
module lex
  import map_pkg::*;
#(
  parameter int unsigned LLR_W = 13
) (
  input  logic [3:1][LLR_W-1:0] llr,
  input  sym_t                  sym,
  output logic [3:1][LA_W-1:0]  ext
);
  localparam int signed EMAX = (1 <<< (LA_W - 1)) - 1;
  localparam int signed EMIN = -(1 <<< (LA_W - 1));
  int sys [4];
  int e;

  always_comb begin
    sys[0] = 0;
    sys[1] = int'($signed(sym.rb));
    sys[2] = int'($signed(sym.ra));
    sys[3] = sys[1] + sys[2];
    for (int z = 1; z < 4; z++) begin
      e = int'($signed(llr[z])) - int'($signed(sym.la[z])) - sys[z];
      if (e > EMAX)      e = EMAX;
      else if (e < EMIN) e = EMIN;
      ext[z] = LA_W'(e);
    end
  end
endmodule
