// tb_tbu_r4: self-checking test of the radix-4 traceback unit.
// The testbench models the radix-4 ACSU with integers (A-relative
// differences, select bits of the winner) and checks that the TBU
// regenerates the candidates and previous metrics exactly, including with
// fully random 8-bit values.
module tb_tbu_r4;
  import map_ref_pkg::*;
  localparam int W = 8;
  logic [W-1:0]      si;
  logic [2:0][W-1:0] df;
  logic              s0, s1;
  logic [3:0][W-1:0] br, sum, so;
  int checks = 0, failures = 0;
  int won[4] = '{0, 0, 0, 0};

  tbu_r4 #(.W(W)) dut (.state_in(si), .diff(df), .s0(s0), .s1(s1), .branch_in(br),
                       .sum(sum), .state_out(so));

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
    int s[4], b[4], c[4], base, d[3], w, corr, mab, mcd, dd;
    for (int t = 0; t < 3000; t++) begin
      base = $urandom_range(0, 255);
      for (int i = 0; i < 4; i++) begin
        if (t < 2000) begin
          s[i] = base + int'($urandom_range(0, 60)) - 30;
          b[i] = int'($urandom_range(0, 60)) - 30;
        end else begin
          s[i] = $urandom_range(0, 255);
          b[i] = $urandom_range(0, 255);
        end
        c[i] = s[i] + b[i];
        br[i] = W'(b[i]);
      end
      for (int i = 0; i < 3; i++) d[i] = sx(c[0] - c[i + 1], W);
      // winner: any candidate X with every signed (X - Y) >= 0
      w = 0;
      for (int i = 3; i >= 0; i--) begin
        bit ok = 1;
        for (int j = 0; j < 4; j++) if (sx(c[i] - c[j], W) < 0) ok = 0;
        if (ok) w = i;
      end
      if (t >= 2000) w = $urandom_range(0, 3);   // inverse holds for any stored choice
      // same correction rule as the ACSU, from A-relative differences
      mab = (d[0] >= 0) ? 0 : -d[0];
      mcd = (d[1] <= d[2]) ? -d[1] : -d[2];
      dd  = mab - mcd;
      corr = ref_corr(dd) + ref_corr((dd < 0) ? d[2] - d[1] : d[0]);
      si = W'(c[w] + corr);
      {s0, s1} = 2'(w);
      for (int i = 0; i < 3; i++) df[i] = W'(d[i]);
      #1;
      for (int i = 0; i < 4; i++) begin
        chk(so[i] == W'(s[i]), $sformatf("state_out[%0d]=%0d exp %0d (w=%0d)", i, so[i], W'(s[i]), w));
        chk(sum[i] == W'(c[i]), "sum");
      end
      won[w]++;
    end
    for (int i = 0; i < 4; i++) chk(won[i] > 0, "every select-bit combination");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
