// tb_hd: self-checking test of the hard decision module.
module tb_hd;
  localparam int LLR_W = 13;
  logic [3:1][LLR_W-1:0] llr;
  logic [1:0] bits;
  int checks = 0, failures = 0;
  int hit[4] = '{0, 0, 0, 0};

  hd #(.LLR_W(LLR_W)) dut (.llr(llr), .bits(bits));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[4], best;
    for (int t = 0; t < 2000; t++) begin
      v[0] = 0;
      for (int z = 1; z < 4; z++) begin
        v[z] = int'($urandom_range(0, 2000)) - 1000;
        if (t % 5 == 0) v[z] = int'($urandom_range(0, 2)) - 1;   // near ties
        llr[z] = LLR_W'(v[z]);
      end
      #1;
      best = 0;
      for (int z = 1; z < 4; z++) if (v[z] > v[best]) best = z;
      checks++;
      if (int'(bits) != best) begin failures++; $display("FAIL got %0d exp %0d", bits, best); end
      hit[best]++;
    end
    for (int z = 0; z < 4; z++) begin
      checks++;
      if (hit[z] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
