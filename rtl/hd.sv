// hd: hard decision for one double-binary symbol.
//
// Picks the input pair z = {A,B} with the largest a posteriori LLR, where
// z = 0 has LLR 0 by definition and llr[1..3] are relative to it. Ties go to
// the smaller z. Output bits[1] = A, bits[0] = B. Combinational. The source
// names a hard-decision module on each path; the arg-max rule and tie
// handling are this design's choices.
module hd #(
  parameter int unsigned LLR_W = 13
) (
  input  logic [3:1][LLR_W-1:0] llr,
  output logic [1:0]            bits
);
  logic signed [LLR_W-1:0] best;

  always_comb begin
    best = '0;
    bits = 2'd0;
    for (int z = 1; z < 4; z++)
      if ($signed(llr[z]) > best) begin
        best = llr[z];
        bits = 2'(z);
      end
  end
endmodule
