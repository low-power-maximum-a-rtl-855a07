// tb_acsu_r4: self-checking test of the radix-4 ACSU.
// Checks the corrected maximum, the A-relative differences and that the
// select bits point at a maximal candidate (s0: C/D pair, s1: second of the
// pair). All four winner positions must occur.
module tb_acsu_r4;
  import map_ref_pkg::*;
  localparam int W = 8;
  logic [3:0][W-1:0] st, br;
  logic [W-1:0]      so;
  logic [2:0][W-1:0] df;
  logic              s0, s1;
  int checks = 0, failures = 0;
  int won[4] = '{0, 0, 0, 0};

  acsu_r4 #(.W(W)) dut (.state_in(st), .branch_in(br), .state_out(so), .diff(df),
                        .s0(s0), .s1(s1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int s[4], b[4], c[4], base, e, m, w;
    for (int t = 0; t < 2000; t++) begin
      base = $urandom_range(0, 255);
      for (int i = 0; i < 4; i++) begin
        s[i] = base + int'($urandom_range(0, 60)) - 30;
        b[i] = int'($urandom_range(0, 60)) - 30;
        c[i] = s[i] + b[i];
        st[i] = W'(s[i]);
        br[i] = W'(b[i]);
      end
      #1;
      e = ref_maxstar(c[0], c[1], c[2], c[3], 1'b1);
      m = c[0];
      for (int i = 1; i < 4; i++) if (c[i] > m) m = c[i];
      w = {s0, s1};
      chk(so == W'(e), $sformatf("state_out %0d exp %0d", so, W'(e)));
      chk(df[0] == W'(c[0] - c[1]), "diff0");
      chk(df[1] == W'(c[0] - c[2]), "diff1");
      chk(df[2] == W'(c[0] - c[3]), "diff2");
      chk(c[w] == m, $sformatf("select bits point at %0d, not a maximum", w));
      won[w]++;
    end
    // worked example: A=1 B=9 C=30 D=2 -> winner C: s0=1 s1=0, max 30 + corr(|9-30|)+corr(28)=30
    st = '0;
    br[0] = 8'd1; br[1] = 8'd9; br[2] = 8'd30; br[3] = 8'd2;
    #1 chk(so == 8'd30 && s0 && !s1 && df[1] == 8'(-29), "worked example");
    for (int i = 0; i < 4; i++) chk(won[i] > 0, "every winner position");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
