// map_pkg: constants, types and pure functions shared by the traceback
// double-binary (DB) MAP decoder.
//
// * Fixed widths of the channel interface: soft inputs (IN_W), a priori /
//   extrinsic LLRs (LA_W) and branch metrics (BM_W). The 8-bit branch metric
//   width matches the unit simulations of the add-compare-select and
//   traceback units; the 4-bit soft input is one of the two quantisations
//   (3 or 4 bits) named for "soft" symbols. LA_W is this design's choice.
// * The 8-state DB trellis. The constituent code is a duo-binary recursive
//   code with inputs z = {A,B}, state {s1,s2,s3} (s1 = MSB) and parities Y, W.
//   The exact generator polynomials are this design's choice; what the
//   traceback relies on is a property of the trellis: the four predecessors
//   of a state (and the four successors of a state) are distinct, and the
//   eight states split into two groups of four that are the predecessor sets
//   of two "anchor" states (and the successor sets of two other anchors).
//   That is what lets two traceback units regenerate all eight metrics.
// * The log-MAP correction look-up table (LUT) driven by the three difference
//   metrics. Its contents are this design's choice: ln(1+e^-|x|) quantised
//   with two fractional bits, applied once to the final and once to the
//   winning-pair comparison of a radix-2*2 tree. The radix-4 variant computes
//   the same value from its A-relative differences, so both structures give
//   identical state metrics.
package map_pkg;

  localparam int unsigned IN_W   = 4;   // soft channel value, signed
  localparam int unsigned LA_W   = 6;   // a priori / extrinsic LLR, signed
  localparam int unsigned BM_W   = 8;   // branch metric, signed

  // One received DB symbol with its a priori information.
  // la[z] is the a priori LLR of input z relative to z = 0 (z = 1..3).
  typedef struct packed {
    logic [IN_W-1:0]        ra;   // systematic A
    logic [IN_W-1:0]        rb;   // systematic B
    logic [IN_W-1:0]        ry;   // parity Y
    logic [IN_W-1:0]        rw;   // parity W
    logic [3:1][LA_W-1:0]   la;
  } sym_t;

  // -------------------------------------------------------------------
  // Trellis. z[1] = A, z[0] = B; state index {s1,s2,s3}.
  // -------------------------------------------------------------------
  function automatic logic [2:0] next_state(logic [2:0] s, logic [1:0] z);
    logic a, b;
    a = z[1];
    b = z[0];
    return {a ^ b ^ s[2] ^ s[0], s[2] ^ b, s[1] ^ b};
  endfunction

  function automatic logic [2:0] prev_state(logic [2:0] n, logic [1:0] z);
    logic a, b;
    a = z[1];
    b = z[0];
    return {n[1] ^ b, n[0] ^ b, n[2] ^ a ^ n[1]};
  endfunction

  // Parity pair {Y,W} emitted on the transition leaving s with input z.
  function automatic logic [1:0] parity(logic [2:0] s, logic [1:0] z);
    logic f;
    f = z[1] ^ z[0] ^ s[2] ^ s[0];
    return {f ^ s[1] ^ s[0], f ^ s[0]};
  endfunction

  // Neighbour feeding ACSU input z of state s: the predecessor for the
  // forward (alpha) recursion, the successor for the backward (beta) one.
  function automatic logic [2:0] nbr(logic bwd, logic [2:0] s, logic [1:0] z);
    return bwd ? next_state(s, z) : prev_state(s, z);
  endfunction

  // Index {A,B,Y,W} of the branch metric on ACSU input z of state s.
  function automatic logic [3:0] bm_sel(logic bwd, logic [2:0] s, logic [1:0] z);
    return bwd ? {z, parity(s, z)} : {z, parity(prev_state(s, z), z)};
  endfunction

  // Anchor states whose ACSU difference metrics are stored: their neighbour
  // sets are disjoint and cover all eight states.
  function automatic logic [2:0] anchor(logic bwd, logic j);
    return bwd ? {j, 2'b00} : {2'b00, j};
  endfunction

  // -------------------------------------------------------------------
  // Log-MAP correction LUT (values in metric LSBs, 1 LSB = 0.25).
  // -------------------------------------------------------------------
  function automatic int corr_f(int x);
    int g;
    g = (x < 0) ? -x : x;
    if (g == 0)      return 3;
    else if (g <= 3) return 2;
    else if (g <= 8) return 1;
    else             return 0;
  endfunction

  // Radix-2*2: d0 = A-B, d1 = C-D, d2 = max(A,B)-max(C,D).
  function automatic int lut_r22(int d0, int d1, int d2);
    return corr_f(d2) + corr_f((d2 < 0) ? d1 : d0);
  endfunction

  // Radix-4: d0 = A-B, d1 = A-C, d2 = A-D (all relative to A).
  function automatic int lut_r4(int d0, int d1, int d2);
    int mab, mcd, dd;
    mab = (d0 >= 0) ? 0 : -d0;          // max(A,B) - A
    mcd = (d1 <= d2) ? -d1 : -d2;       // max(C,D) - A
    dd  = mab - mcd;                    // max(A,B) - max(C,D)
    return corr_f(dd) + corr_f((dd < 0) ? (d2 - d1) : d0);
  endfunction

endpackage
