// tb_map_decoder: end-to-end test of the traceback MAP decoder at its
// default parameters (L = 32, SM_W = 10, radix-2*2, log-MAP LUT).
//
// Several windows are decoded back to back. Each window's symbols come from
// the constituent encoder driven by random input pairs, mapped to +/-3 and
// disturbed by uniform noise of +/-2, with zero (first window), noisy or
// confident a priori LLRs (last window, which drives the extrinsic output
// into saturation). An integer model runs
// the full forward and backward recursions and the a posteriori / extrinsic
// / hard-decision equations; every output of both paths, and the border
// metrics alpha_out / beta_out, must match it exactly (modulo 2^W for the
// metrics). The schedule is checked too: L read cycles per window, L/2
// result cycles, done exactly L cycles after start. Each mechanism of the
// architecture (initial-metric load, cache write, crossing seed, traceback
// step from the cache, both sign paths of the TBU muxes, extrinsic
// saturation, start ignored while busy) is counted and must occur.
module tb_map_decoder;
  import map_pkg::*;
  import map_ref_pkg::*;
  localparam int L = 32, W = 10, LLR_W = W + 3, NWIN = 6;
  localparam bit R4 = 1'b0, LUT = 1'b1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0][W-1:0] alpha_in, beta_in, alpha_out, beta_out;
  logic busy, rd_en, out_valid, done;
  logic [4:0] rd_idx_a, rd_idx_b, out_idx_a, out_idx_b;
  sym_t sym_a, sym_b;
  logic [3:1][LLR_W-1:0] llr_a, llr_b;
  logic [3:1][LA_W-1:0] ext_a, ext_b;
  logic [1:0] hd_a, hd_b;

  map_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load = 0, n_smc_wr = 0, n_seed = 0, n_tb_step = 0, n_sign_neg = 0,
      n_sign_pos = 0, n_sat = 0, n_start_ignored = 0, n_bit_err = 0;

  initial begin : watchdog
    repeat (NWIN * (L + 10) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  sym_t buffer [L];
  int   info   [L];
  int   g      [L][16];
  int   alpha  [L+1][8];
  int   beta   [L+1][8];
  int   ai     [8];
  int   bi     [8];

  // external symbol buffer, read combinationally
  assign sym_a = buffer[rd_idx_a];
  assign sym_b = buffer[rd_idx_b];

  localparam int AMP = 3;
  function automatic int noise();
    return int'($urandom_range(0, 4)) - 2;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic make_window(int w);
    int s, yw, ra, rb, ry, rw, la[4], pri[4];
    s = $urandom_range(0, 7);
    for (int k = 0; k < L; k++) begin
      info[k] = $urandom_range(0, 3);
      s = enc(s, info[k], yw);
      ra = clampi(((info[k] >> 1) ? AMP : -AMP) + noise(), -8, 7);
      rb = clampi(((info[k] & 1)  ? AMP : -AMP) + noise(), -8, 7);
      ry = clampi(((yw >> 1)      ? AMP : -AMP) + noise(), -8, 7);
      rw = clampi(((yw & 1)       ? AMP : -AMP) + noise(), -8, 7);
      // noisy prior: +8 on the transmitted pair, +/-4 noise on all four
      for (int z = 0; z < 4; z++)
        pri[z] = ((info[k] == z) ? 8 : 0) + int'($urandom_range(0, 8)) - 4;
      la[0] = 0;
      for (int z = 1; z < 4; z++)
        if (w == 0) la[z] = 0;                                   // first iteration
        else if (w == NWIN - 1)                                  // confident a priori
          la[z] = (info[k] == z) ? 31 : (info[k] == 0) ? -32 : 0;
        else la[z] = pri[z] - pri[0];
      buffer[k].ra = IN_W'(ra); buffer[k].rb = IN_W'(rb);
      buffer[k].ry = IN_W'(ry); buffer[k].rw = IN_W'(rw);
      for (int z = 1; z < 4; z++) buffer[k].la[z] = LA_W'(la[z]);
      for (int i = 0; i < 16; i++)
        g[k][i] = la[i >> 2] + ((i >> 3) & 1) * ra + ((i >> 2) & 1) * rb
                + ((i >> 1) & 1) * ry + (i & 1) * rw;
    end
    for (int q = 0; q < 8; q++) begin
      ai[q] = (w % 2) ? int'($urandom_range(0, 40)) - 20 : 0;
      bi[q] = (w % 2) ? int'($urandom_range(0, 40)) - 20 : 0;
    end
    // integer model of both recursions
    begin
      int d[2][3], sl[2], nx[8];
      alpha[0] = ai;
      for (int k = 0; k < L; k++) begin
        ref_step(1'b0, R4, LUT, alpha[k], g[k], nx, d, sl);
        alpha[k + 1] = nx;
      end
      beta[L] = bi;
      for (int k = L - 1; k >= 0; k--) begin
        ref_step(1'b1, R4, LUT, beta[k + 1], g[k], nx, d, sl);
        beta[k] = nx;
      end
    end
  endtask

  // expected LLRs / extrinsics / decision of symbol k
  task automatic expect_sym(int k, output int llr[4], output int ext[4], output int hdz);
    int m[4], v, n, yw, ra, rb, sys[4], la;
    for (int z = 0; z < 4; z++) begin
      m[z] = -1000000;
      for (int s = 0; s < 8; s++) begin
        n = enc(s, z, yw);
        v = alpha[k][s] + g[k][z * 4 + yw] + beta[k + 1][n];
        if (v > m[z]) m[z] = v;
      end
    end
    ra = sx(longint'(buffer[k].ra), IN_W);
    rb = sx(longint'(buffer[k].rb), IN_W);
    sys = '{0, rb, ra, ra + rb};
    hdz = 0;
    llr[0] = 0; ext[0] = 0;
    for (int z = 1; z < 4; z++) begin
      llr[z] = m[z] - m[0];
      la = sx(longint'(buffer[k].la[z]), LA_W);
      ext[z] = clampi(llr[z] - la - sys[z], -32, 31);
      if (llr[z] > llr[hdz]) hdz = z;
    end
  endtask

  task automatic check_out(string p, int idx, logic [3:1][LLR_W-1:0] l,
                           logic [3:1][LA_W-1:0] e, logic [1:0] h);
    int el[4], ee[4], eh;
    expect_sym(idx, el, ee, eh);
    for (int z = 1; z < 4; z++) begin
      chk(sx(longint'(l[z]), LLR_W) == el[z],
          $sformatf("%s sym %0d llr[%0d]=%0d exp %0d", p, idx, z, sx(longint'(l[z]), LLR_W), el[z]));
      chk(sx(longint'(e[z]), LA_W) == ee[z], $sformatf("%s sym %0d ext[%0d]", p, idx, z));
      if (ee[z] == 31 || ee[z] == -32) n_sat++;
    end
    chk(int'(h) == eh, $sformatf("%s sym %0d hard decision", p, idx));
    if (int'(h) != info[idx]) n_bit_err++;
  endtask

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.load) n_load++;
    if (dut.u_smc_a.we) n_smc_wr++;
    if (dut.first) n_seed++;
    if (dut.trace) n_tb_step++;
    if (dut.trace) begin
      for (int j = 0; j < 2; j++)
        for (int q = 0; q < 3; q++) begin
          if (dut.dmr_a[j][q][W-1]) n_sign_neg++; else n_sign_pos++;
        end
    end
    if (start && busy) n_start_ignored++;
  end

  initial begin
    int t0, n_rd, n_out, seen_a [L], seen_b [L];
    alpha_in = '0; beta_in = '0;
    buffer[0] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NWIN; w++) begin
      make_window(w);
      for (int q = 0; q < 8; q++) begin alpha_in[q] = W'(ai[q]); beta_in[q] = W'(bi[q]); end
      for (int k = 0; k < L; k++) begin seen_a[k] = 0; seen_b[k] = 0; end
      @(negedge clk);
      chk(!busy, "idle before start");
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = 0; n_rd = 1; n_out = 0;   // the first read cycle is the current one
      chk(rd_en && rd_idx_a == 0 && rd_idx_b == 5'(L - 1), "first read indices");
      while (!done) begin
        if (t0 == 7) start = 1;      // a start while busy must be ignored
        else start = 0;
        @(negedge clk);
        t0++;
        if (rd_en) n_rd++;
        if (out_valid) begin
          n_out++;
          check_out("upper", int'(out_idx_a), llr_a, ext_a, hd_a);
          check_out("lower", int'(out_idx_b), llr_b, ext_b, hd_b);
          seen_a[out_idx_a]++; seen_b[out_idx_b]++;
          chk(int'(out_idx_a) == L / 2 + n_out - 1 && int'(out_idx_b) == L / 2 - n_out,
              "output order");
        end
        if (t0 > 3 * L) break;
      end
      start = 0;
      $display("window %0d: cumulative symbol errors %0d", w, n_bit_err);
      chk(t0 == L, $sformatf("done %0d cycles after start, expected %0d", t0, L));
      chk(n_rd == L, $sformatf("%0d read cycles, expected %0d", n_rd, L));
      chk(n_out == L / 2, "L/2 result cycles");
      for (int k = 0; k < L; k++)
        chk((k >= L / 2) ? (seen_a[k] == 1 && seen_b[k] == 0) : (seen_b[k] == 1 && seen_a[k] == 0),
            $sformatf("symbol %0d decoded exactly once", k));
      for (int q = 0; q < 8; q++) begin
        chk(alpha_out[q] == W'(alpha[L][q]), $sformatf("alpha_out[%0d]", q));
        chk(beta_out[q] == W'(beta[0][q]), $sformatf("beta_out[%0d]", q));
      end
    end
    $display("mechanisms: load=%0d smc_write=%0d crossing_seed=%0d traceback_step=%0d sign_neg=%0d sign_pos=%0d ext_saturation=%0d start_ignored=%0d",
             n_load, n_smc_wr, n_seed, n_tb_step, n_sign_neg, n_sign_pos, n_sat, n_start_ignored);
    $display("hard-decision symbol errors against the transmitted pairs: %0d of %0d", n_bit_err, NWIN * L);
    chk(n_load == NWIN, "initial metric load every window");
    chk(n_smc_wr == NWIN * L / 2, "cache writes");
    chk(n_seed == NWIN, "crossing seed every window");
    chk(n_tb_step == NWIN * L / 2, "traceback steps");
    chk(n_sign_neg > 0 && n_sign_pos > 0, "both TBU sign paths");
    chk(n_sat > 0, "extrinsic saturation");
    chk(n_start_ignored > 0, "start while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
