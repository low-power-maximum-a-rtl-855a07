// tb_nrp: self-checking test of the natural recursion processor.
// Four instances cover forward/backward recursion with radix-2*2 and radix-4
// ACSUs. After loading random initial metrics they run 60 stages with random
// branch metrics; every stage the register contents and the anchor
// difference metrics / select bits are compared with the integer model
// (modulo 2^W). The radix-4 select bits are checked to point at a maximal
// candidate.
module tb_nrp;
  import map_pkg::*;
  import map_ref_pkg::*;
  localparam int W = 10;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [7:0][W-1:0] init;
  logic [15:0][BM_W-1:0] gamma;
  logic [3:0][7:0][W-1:0] sm_q, sm_d;
  logic [3:0][1:0][2:0][W-1:0] dm;
  logic [3:0][1:0][1:0] sel;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 4; i++) begin : g_dut
    nrp #(.W(W), .BWD(i[0]), .RADIX4(i[1])) dut (
      .clk, .rst_n, .load, .init, .en, .gamma,
      .sm_q(sm_q[i]), .sm_d(sm_d[i]), .dm(dm[i]), .sel(sel[i]));
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

  initial begin
    int cur[4][8], nxt[8], g[16], d[2][3], sl[2], c0;
    init = '0; gamma = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      c0 = int'($urandom_range(0, 100)) - 50;
      for (int i = 0; i < 4; i++) cur[i][s] = c0;
      init[s] = W'(c0);
    end
    load = 1;
    @(negedge clk);
    load = 0;
    for (int i = 0; i < 4; i++)
      for (int s = 0; s < 8; s++) chk(sm_q[i][s] == W'(cur[i][s]), "load");
    en = 1;
    for (int t = 0; t < 60; t++) begin
      for (int k = 0; k < 16; k++) begin
        g[k] = int'($urandom_range(0, 120)) - 60;
        gamma[k] = BM_W'(g[k]);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        ref_step(i[0], i[1], 1'b1, cur[i], g, nxt, d, sl);
        for (int j = 0; j < 2; j++) begin
          for (int q = 0; q < 3; q++)
            chk(dm[i][j][q] == W'(d[j][q]), $sformatf("dut%0d anchor%0d diff%0d", i, j, q));
          if (i[1]) chk(int'({sel[i][j][0], sel[i][j][1]}) == sl[j],
                        $sformatf("dut%0d anchor%0d select bits", i, j));
        end
        for (int s = 0; s < 8; s++) chk(sm_d[i][s] == W'(nxt[s]), $sformatf("dut%0d sm_d[%0d]", i, s));
        cur[i] = nxt;
      end
      @(negedge clk);
      for (int i = 0; i < 4; i++)
        for (int s = 0; s < 8; s++) chk(sm_q[i][s] == W'(cur[i][s]), $sformatf("dut%0d sm_q[%0d]", i, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
