// tb_smc: self-checking test of the state metric cache.
// Fills all entries, reads them back in reverse order (the traceback order),
// checks that we = 0 leaves contents unchanged and that the read port is
// asynchronous (data for a new address appears in the same cycle).
module tb_smc;
  localparam int DEPTH = 16, DW = 60;
  logic clk = 0, we;
  logic [3:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  smc #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1; waddr = 4'(a);
        wdata = {$urandom, $urandom};
        model[a] = wdata;
      end
      @(negedge clk);
      we = 0;
      // writes with we low must be ignored
      waddr = 4'(pass); wdata = '1;
      for (int a = DEPTH - 1; a >= 0; a--) begin
        @(negedge clk);
        raddr = 4'(a);
        #1 chk(rdata == model[a], $sformatf("read addr %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
