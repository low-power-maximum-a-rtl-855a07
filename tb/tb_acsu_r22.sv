// tb_acsu_r22: self-checking test of the radix-2*2 ACSU.
// Random candidates with a spread that cannot wrap: the state output must be
// the integer max plus correction, and the three differences the integer
// differences (A-B, C-D, max(A,B)-max(C,D)), all modulo 2^W. Both signs of
// every difference must be exercised.
module tb_acsu_r22;
  import map_ref_pkg::*;
  localparam int W = 8;
  logic [3:0][W-1:0] st, br;
  logic [W-1:0]      so;
  logic [2:0][W-1:0] df;
  int checks = 0, failures = 0;
  int neg[3] = '{0, 0, 0}, pos[3] = '{0, 0, 0};

  acsu_r22 #(.W(W)) dut (.state_in(st), .branch_in(br), .state_out(so), .diff(df));

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
    int s[4], b[4], c[4], base, e, mab, mcd;
    for (int t = 0; t < 2000; t++) begin
      base = $urandom_range(0, 255);
      for (int i = 0; i < 4; i++) begin
        s[i] = base + int'($urandom_range(0, 60)) - 30;
        b[i] = int'($urandom_range(0, 60)) - 30;
        if (t % 7 == 0) b[i] = 0;   // force ties
        if (t % 7 == 0) s[i] = base;
        c[i] = s[i] + b[i];
        st[i] = W'(s[i]);
        br[i] = W'(b[i]);
      end
      #1;
      e   = ref_maxstar(c[0], c[1], c[2], c[3], 1'b1);
      mab = (c[0] >= c[1]) ? c[0] : c[1];
      mcd = (c[2] >= c[3]) ? c[2] : c[3];
      chk(so == W'(e), $sformatf("state_out %0d exp %0d", so, W'(e)));
      chk(df[0] == W'(c[0] - c[1]), "diff0");
      chk(df[1] == W'(c[2] - c[3]), "diff1");
      chk(df[2] == W'(mab - mcd), "diff2");
      for (int i = 0; i < 3; i++) if (df[i][W-1]) neg[i]++; else pos[i]++;
    end
    // worked example: A=10 B=20 C=5 D=7 -> max 20, |d2|=13, |d0|=10 -> no correction
    st = '{8'd0, 8'd0, 8'd0, 8'd0};
    br[0] = 8'd10; br[1] = 8'd20; br[2] = 8'd5; br[3] = 8'd7;
    #1 chk(so == 8'd20 && df[0] == 8'hF6 && df[1] == 8'hFE && df[2] == 8'd13, "worked example 1");
    // A=B=C=D=0 -> 0 + corr(0) + corr(0) = 6
    br = '0;
    #1 chk(so == 8'd6, "worked example 2");
    for (int i = 0; i < 3; i++) chk(neg[i] > 0 && pos[i] > 0, "both signs of each difference");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
