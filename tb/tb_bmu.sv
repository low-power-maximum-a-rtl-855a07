// tb_bmu: self-checking test of the branch metric unit.
// Random soft values and a priori LLRs, including the extremes; each of the
// 16 metrics must equal la[z] + A*ra + B*rb + Y*ry + W*rw.
module tb_bmu;
  import map_pkg::*;
  import map_ref_pkg::*;
  sym_t sym;
  logic [15:0][BM_W-1:0] g;
  int checks = 0, failures = 0;

  bmu dut (.sym(sym), .gamma(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ra, rb, ry, rw, la[4], e;
    for (int t = 0; t < 1000; t++) begin
      ra = int'($urandom_range(0, 15)) - 8;  rb = int'($urandom_range(0, 15)) - 8;
      ry = int'($urandom_range(0, 15)) - 8;  rw = int'($urandom_range(0, 15)) - 8;
      la[0] = 0;
      for (int z = 1; z < 4; z++) la[z] = int'($urandom_range(0, 63)) - 32;
      if (t == 0) begin ra = -8; rb = -8; ry = -8; rw = -8; la = '{0, -32, -32, -32}; end
      if (t == 1) begin ra = 7; rb = 7; ry = 7; rw = 7; la = '{0, 31, 31, 31}; end
      sym.ra = IN_W'(ra); sym.rb = IN_W'(rb); sym.ry = IN_W'(ry); sym.rw = IN_W'(rw);
      for (int z = 1; z < 4; z++) sym.la[z] = LA_W'(la[z]);
      #1;
      for (int i = 0; i < 16; i++) begin
        e = la[i >> 2] + ((i >> 3) & 1) * ra + ((i >> 2) & 1) * rb
          + ((i >> 1) & 1) * ry + (i & 1) * rw;
        checks++;
        if (sx(longint'(g[i]), BM_W) != e) begin
          failures++;
          $display("FAIL gamma[%0d]=%0d exp %0d", i, sx(longint'(g[i]), BM_W), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
