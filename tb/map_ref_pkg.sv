// map_ref_pkg: integer reference model used by the testbenches.
//
// Everything here is computed with plain integers (no wrap-around) and
// written independently of the RTL: the trellis comes from the encoder
// register equations, predecessors are found by search, and the correction
// table is spelled out again. Results are compared with the RTL modulo
// 2^W.
package map_ref_pkg;

  // Constituent encoder: state {s1,s2,s3}, input z = {A,B}.
  // Returns next state; yw = {Y,W} parity pair.
  function automatic int enc(int s, int z, output int yw);
    int a, b, s1, s2, s3, f;
    a  = (z >> 1) & 1;  b  = z & 1;
    s1 = (s >> 2) & 1;  s2 = (s >> 1) & 1;  s3 = s & 1;
    f  = a ^ b ^ s1 ^ s3;
    yw = ((f ^ s2 ^ s3) << 1) | (f ^ s3);
    return (f << 2) | ((s1 ^ b) << 1) | (s2 ^ b);
  endfunction

  function automatic int pred(int n, int z);
    int yw;
    for (int s = 0; s < 8; s++) if (enc(s, z, yw) == n) return s;
    return -1;
  endfunction

  function automatic int ref_corr(int x);
    int g;
    g = (x < 0) ? -x : x;
    case (g)
      0:             return 3;
      1, 2, 3:       return 2;
      4, 5, 6, 7, 8: return 1;
      default:       return 0;
    endcase
  endfunction

  // Log-MAP style max over four candidates as both ACSU types compute it.
  function automatic int ref_maxstar(int c0, int c1, int c2, int c3, bit use_lut);
    int mab, mcd, m, dpair;
    mab = (c0 >= c1) ? c0 : c1;
    mcd = (c2 >= c3) ? c2 : c3;
    m   = (mab >= mcd) ? mab : mcd;
    dpair = (mab >= mcd) ? (c0 - c1) : (c2 - c3);
    return use_lut ? m + ref_corr(mab - mcd) + ref_corr(dpair) : m;
  endfunction

  // Sign-extend the low w bits of v.
  function automatic int sx(longint v, int w);
    longint m;
    m = (longint'(1) << w) - 1;
    v = v & m;
    if (v >= (longint'(1) << (w - 1))) v = v - (longint'(1) << w);
    return int'(v);
  endfunction

  // One recursion stage of all eight states (integer model).
  // bwd = 0: nxt[n] from cur = alpha[k] over predecessors (forward);
  // bwd = 1: nxt[s] from cur = beta[k+1] over successors (backward).
  // dm/sel return the stored differences and select bits of the two anchor
  // states (forward anchors 0 and 1, backward anchors 0 and 4) in the
  // radix-2*2 (r4 = 0) or radix-4 (r4 = 1) format.
  function automatic void ref_step(bit bwd, bit r4, bit use_lut, int cur[8], int g[16],
                                   output int nxt[8], output int dm[2][3], output int sel[2]);
    int c[4], yw, p, mab, mcd, m, w;
    for (int s = 0; s < 8; s++) begin
      for (int z = 0; z < 4; z++) begin
        if (bwd) begin
          p = enc(s, z, yw);
        end else begin
          p = pred(s, z);
          void'(enc(p, z, yw));
        end
        c[z] = cur[p] + g[z * 4 + yw];
      end
      nxt[s] = ref_maxstar(c[0], c[1], c[2], c[3], use_lut);
      for (int j = 0; j < 2; j++)
        if (s == (bwd ? 4 * j : j)) begin
          mab = (c[0] >= c[1]) ? c[0] : c[1];
          mcd = (c[2] >= c[3]) ? c[2] : c[3];
          m   = (mab >= mcd) ? mab : mcd;
          if (r4) begin
            dm[j] = '{c[0] - c[1], c[0] - c[2], c[0] - c[3]};
            w = 0;
            for (int i = 3; i >= 0; i--) if (c[i] == m) w = i;
            sel[j] = w;    // {s0,s1}
          end else begin
            dm[j] = '{c[0] - c[1], c[2] - c[3], mab - mcd};
            sel[j] = 0;
          end
        end
    end
  endfunction

endpackage
