// tb_lex: self-checking test of the log-extrinsic module, including
// saturation at both ends of the 6-bit range.
module tb_lex;
  import map_pkg::*;
  localparam int LLR_W = 13;
  logic [3:1][LLR_W-1:0] llr;
  sym_t sym;
  logic [3:1][LA_W-1:0] ext;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  lex #(.LLR_W(LLR_W)) dut (.llr(llr), .sym(sym), .ext(ext));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l[4], la[4], ra, rb, sys[4], e;
    for (int t = 0; t < 2000; t++) begin
      ra = int'($urandom_range(0, 15)) - 8;
      rb = int'($urandom_range(0, 15)) - 8;
      sym.ra = IN_W'(ra); sym.rb = IN_W'(rb); sym.ry = '0; sym.rw = '0;
      sys = '{0, rb, ra, ra + rb};
      for (int z = 1; z < 4; z++) begin
        l[z]  = int'($urandom_range(0, 200)) - 100;
        la[z] = int'($urandom_range(0, 63)) - 32;
        llr[z] = LLR_W'(l[z]);
        sym.la[z] = LA_W'(la[z]);
      end
      #1;
      for (int z = 1; z < 4; z++) begin
        e = l[z] - la[z] - sys[z];
        if (e > 31) begin e = 31; sat_hi++; end
        if (e < -32) begin e = -32; sat_lo++; end
        checks++;
        if (ext[z] != LA_W'(e)) begin failures++; $display("FAIL ext[%0d]", z); end
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
