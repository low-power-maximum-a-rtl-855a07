// tb_trp: self-checking test of the traceback recursion processor.
// For each of four instances (alpha/beta traceback, radix-2*2/radix-4) the
// integer model first runs K recursion stages, keeping each stage's anchor
// difference metrics and branch metrics. The TRP is then seeded with the
// last stage and fed the stored stages in reverse; every cycle its
// regenerated eight metrics must equal the ones the recursion produced.
// The first step uses the seed input, the rest the TRP's own register.
module tb_trp;
  import map_pkg::*;
  import map_ref_pkg::*;
  localparam int W = 10, K = 24;
  logic clk = 0, rst_n = 0, seed_sel = 0, en = 0;
  logic [3:0][7:0][W-1:0] seed, cur, nxt;
  logic [3:0][1:0][2:0][W-1:0] dm;
  logic [3:0][1:0][1:0] sel;
  logic [3:0][15:0][BM_W-1:0] gamma;
  logic [3:0][1:0][3:0][W-1:0] sum;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 4; i++) begin : g_dut
    trp #(.W(W), .BWD(i[0]), .RADIX4(i[1])) dut (
      .clk, .rst_n, .seed_sel, .seed(seed[i]), .en, .dm(dm[i]), .sel(sel[i]),
      .gamma(gamma[i]), .cur(cur[i]), .nxt(nxt[i]), .sum(sum[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int sm [4][K+1][8];      // stage metrics, index = trellis stage
  int gs [4][K][16];
  int ds [4][K][2][3];
  int ss [4][K][2];

  initial begin
    int cur_i[8], nxt_i[8], g[16], d[2][3], sl[2], k;
    // build the chains
    for (int i = 0; i < 4; i++) begin
      for (int s = 0; s < 8; s++) cur_i[s] = int'($urandom_range(0, 100)) - 50;
      for (int t = 0; t < K; t++) begin
        k = i[0] ? K - 1 - t : t;           // backward recursion runs k = K-1 .. 0
        for (int q = 0; q < 16; q++) g[q] = int'($urandom_range(0, 120)) - 60;
        if (t == 0) sm[i][i[0] ? K : 0] = cur_i;
        ref_step(i[0], i[1], 1'b1, cur_i, g, nxt_i, d, sl);
        gs[i][k] = g; ds[i][k] = d; ss[i][k] = sl;
        sm[i][i[0] ? k : k + 1] = nxt_i;
        cur_i = nxt_i;
      end
    end
    seed = '0; dm = '0; sel = '0; gamma = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int c = 0; c < K; c++) begin
      seed_sel = (c == 0);
      for (int i = 0; i < 4; i++) begin
        k = i[0] ? c : K - 1 - c;           // stage whose differences are used
        for (int s = 0; s < 8; s++) seed[i][s] = W'(sm[i][i[0] ? 0 : K][s]);
        for (int j = 0; j < 2; j++) begin
          for (int q = 0; q < 3; q++) dm[i][j][q] = W'(ds[i][k][j][q]);
          // {s1,s0} from winner index w = 2*s0 + s1
          sel[i][j] = {ss[i][k][j][0], ss[i][k][j][1]};
        end
        for (int q = 0; q < 16; q++) gamma[i][q] = BM_W'(gs[i][k][q]);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        k = i[0] ? c : K - 1 - c;
        for (int s = 0; s < 8; s++) begin
          chk(cur[i][s] == W'(sm[i][i[0] ? k : k + 1][s]), $sformatf("dut%0d step%0d cur[%0d]", i, c, s));
          chk(nxt[i][s] == W'(sm[i][i[0] ? k + 1 : k][s]), $sformatf("dut%0d step%0d nxt[%0d]", i, c, s));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
