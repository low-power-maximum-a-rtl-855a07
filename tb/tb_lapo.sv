// tb_lapo: self-checking test of the log a posteriori module.
// Random forward/backward metrics with an arbitrary common offset (so they
// wrap modulo 2^W) and random branch metrics; the LLRs must equal the
// integer max-log result computed over the 32 transitions. Both variants are
// tested: dut_b takes the eight reused sums from the beta side (transitions
// leaving states 0 and 4), dut_f from the alpha side (transitions entering
// states 0 and 1). The reused sums are built here as wrapped metric plus
// branch metric, as a traceback unit delivers them. The metric spread stays
// within the decoder's range (380) so the normalised sums are exact.
module tb_lapo;
  import map_pkg::*;
  import map_ref_pkg::*;
  localparam int W = 10, LLR_W = W + 3;
  logic [7:0][W-1:0] alpha, beta;
  logic [15:0][BM_W-1:0] gamma;
  logic [1:0][3:0][W-1:0] ts_b, ts_f;
  logic [3:1][LLR_W-1:0] llr_b, llr_f;
  int checks = 0, failures = 0;

  lapo #(.W(W), .TSUM_BWD(1'b1)) dut_b (
    .alpha(alpha), .beta(beta), .gamma(gamma), .tsum(ts_b), .llr(llr_b));
  lapo #(.W(W), .TSUM_BWD(1'b0)) dut_f (
    .alpha(alpha), .beta(beta), .gamma(gamma), .tsum(ts_f), .llr(llr_f));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a[8], b[8], g[16], m[4], v, n, s, yw, oa, ob;
    int anc_b[2], anc_f[2];
    anc_b = '{0, 4};
    anc_f = '{0, 1};
    for (int t = 0; t < 1000; t++) begin
      oa = $urandom_range(0, 1023);
      ob = $urandom_range(0, 1023);
      for (int k = 0; k < 8; k++) begin
        a[k] = int'($urandom_range(0, 380)) - 190;
        b[k] = int'($urandom_range(0, 380)) - 190;
        alpha[k] = W'(a[k] + oa);
        beta[k]  = W'(b[k] + ob);
      end
      for (int i = 0; i < 16; i++) begin
        g[i] = int'($urandom_range(0, 127)) - 64;
        gamma[i] = BM_W'(g[i]);
      end
      for (int j = 0; j < 2; j++)
        for (int z = 0; z < 4; z++) begin
          n = enc(anc_b[j], z, yw);
          ts_b[j][z] = W'(b[n] + ob + g[z * 4 + yw]);
          s = pred(anc_f[j], z);
          n = enc(s, z, yw);
          ts_f[j][z] = W'(a[s] + oa + g[z * 4 + yw]);
        end
      #1;
      for (int z = 0; z < 4; z++) begin
        m[z] = -100000;
        for (int k = 0; k < 8; k++) begin
          n = enc(k, z, yw);
          v = a[k] + g[z * 4 + yw] + b[n];
          if (v > m[z]) m[z] = v;
        end
      end
      for (int z = 1; z < 4; z++) begin
        checks += 2;
        if (sx(longint'(llr_b[z]), LLR_W) != m[z] - m[0]) begin
          failures++;
          $display("FAIL beta-side llr[%0d]=%0d exp %0d", z, sx(longint'(llr_b[z]), LLR_W),
                   m[z] - m[0]);
        end
        if (sx(longint'(llr_f[z]), LLR_W) != m[z] - m[0]) begin
          failures++;
          $display("FAIL alpha-side llr[%0d]=%0d exp %0d", z, sx(longint'(llr_f[z]), LLR_W),
                   m[z] - m[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
