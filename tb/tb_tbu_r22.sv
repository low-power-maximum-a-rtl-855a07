// tb_tbu_r22: self-checking test of the radix-2*2 traceback unit.
// The testbench plays the ACSU itself (integer model): from random previous
// metrics and branch metrics it forms the new metric and the three
// differences, then the TBU must return the candidates A..D and the previous
// metrics exactly. Part of the runs use fully random 8-bit values, where the
// inverse must still hold modulo 2^W.
module tb_tbu_r22;
  import map_ref_pkg::*;
  localparam int W = 8;
  logic [W-1:0]      si;
  logic [2:0][W-1:0] df;
  logic [3:0][W-1:0] br, sum, so;
  int checks = 0, failures = 0;

  tbu_r22 #(.W(W)) dut (.state_in(si), .diff(df), .branch_in(br), .sum(sum), .state_out(so));

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
    int s[4], b[4], c[4], base, mab, mcd, d0, d1, d2, m, corr;
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
      // ACSU model with signed W-bit comparisons
      d0  = sx(c[0] - c[1], W);
      d1  = sx(c[2] - c[3], W);
      mab = (d0 >= 0) ? c[0] : c[1];
      mcd = (d1 >= 0) ? c[2] : c[3];
      d2  = sx(mab - mcd, W);
      m   = (d2 >= 0) ? mab : mcd;
      corr = ref_corr(d2) + ref_corr((d2 >= 0) ? d0 : d1);
      si = W'(m + corr);
      df[0] = W'(d0); df[1] = W'(d1); df[2] = W'(d2);
      #1;
      for (int i = 0; i < 4; i++) begin
        chk(so[i] == W'(s[i]), $sformatf("state_out[%0d]=%0d exp %0d", i, so[i], W'(s[i])));
        chk(sum[i] == W'(c[i]), "sum");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
