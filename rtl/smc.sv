// smc: state metric cache holding difference metrics.
//
// A DEPTH-entry register-file memory: one write port and one
// asynchronous read port. In the traceback decoder each entry holds one
// trellis stage, i.e. the six difference metrics of the two anchor ACSUs
// (6*W bits) plus, for the radix-4 structure, their four select bits, instead
// of the eight state metrics a conventional cache would store. DEPTH is L/2:
// a path writes one stage per cycle while its recursion runs towards the
// middle of the window and reads them back in reverse order afterwards.
//
// Write on the rising clock edge when we = 1; read data follows raddr in the
// same cycle. The asynchronous read is this design's choice (it lets the
// traceback read the stage written in the last cycle before the crossing
// without a bypass). Contents are not reset.
module smc #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned DW    = 60,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

  a_waddr: assert property (@(posedge clk) we |-> (32'(waddr) < DEPTH))
    else $error("smc: write address out of range");
endmodule
