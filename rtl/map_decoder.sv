// map_decoder: traceback double-binary MAP decoder (one SISO window).
//
// The decoder processes a window of L DB symbols with two mirrored paths.
// The upper path owns a BMU and an NRP running the forward (alpha)
// recursion from symbol 0; the lower path owns a BMU and an NRP running the
// backward (beta) recursion from symbol L-1. Each path has a state metric
// cache (SMC) of depth L/2, a traceback recursion processor (TRP), a log a
// posteriori module (LAPO), a log-extrinsic module (LEX) and a hard decision
// module (HD).
//
// Phase 1 (L/2 cycles, "natural"): both NRPs run towards the middle of the
// window. Instead of eight state metrics per stage, each SMC stores the six
// difference metrics (radix-4: plus four select bits) of two anchor ACSUs.
// Phase 2 (L/2 cycles, "traceback"): both NRPs keep running past the
// middle. Each path's TRP starts from the other path's NRP metrics at the
// crossing and regenerates, from the other path's SMC read in reverse, the
// metrics that path produced in phase 1. The upper path thus pairs
// alpha[k] (its NRP) with beta[k+1] (TRP) and emits symbols L/2 .. L-1; the
// lower path pairs alpha[k] (TRP) with beta[k+1] (its NRP) and emits symbols
// L/2-1 .. 0. Two symbols are decoded per cycle in phase 2. Each LAPO takes
// eight of its 32 transition sums from its own TRP's traceback units.
//
// Interface: a one-cycle `start` loads alpha_in / beta_in (initial border
// metrics) and begins a window. In each of the next L cycles rd_en is high
// and the decoder reads symbol rd_idx_a on sym_a and rd_idx_b on sym_b,
// combinationally from an external buffer. Results are registered: out_valid
// is high for the L/2 cycles after each phase-2 cycle, giving out_idx_*,
// llr_*, ext_* and hd_* for both paths. `done` pulses with the last results;
// alpha_out (= alpha[L]) and beta_out (= beta[0]) are then valid and hold
// until the next start. start is ignored while busy.
//
// The two-path organisation, the crossing, the SMC depth L/2 and the
// six-difference storage follow the source architecture. The window length
// L = 32, metric width SM_W = 10, the fixed schedule and the external-buffer
// interface are this design's choices.
module map_decoder
  import map_pkg::*;
#(
  parameter int unsigned L       = 32,
  parameter int unsigned SM_W    = 10,
  parameter bit          RADIX4  = 1'b0,
  parameter bit          USE_LUT = 1'b1,
  localparam int unsigned IW     = $clog2(L),
  localparam int unsigned LLR_W  = SM_W + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [7:0][SM_W-1:0]    alpha_in,
  input  logic [7:0][SM_W-1:0]    beta_in,
  output logic                    busy,
  output logic                    rd_en,
  output logic [IW-1:0]           rd_idx_a,
  output logic [IW-1:0]           rd_idx_b,
  input  sym_t                    sym_a,
  input  sym_t                    sym_b,
  output logic                    out_valid,
  output logic [IW-1:0]           out_idx_a,
  output logic [IW-1:0]           out_idx_b,
  output logic [3:1][LLR_W-1:0]   llr_a,
  output logic [3:1][LLR_W-1:0]   llr_b,
  output logic [3:1][LA_W-1:0]    ext_a,
  output logic [3:1][LA_W-1:0]    ext_b,
  output logic [1:0]              hd_a,
  output logic [1:0]              hd_b,
  output logic                    done,
  output logic [7:0][SM_W-1:0]    alpha_out,
  output logic [7:0][SM_W-1:0]    beta_out
);
  localparam int unsigned HALF = L / 2;
  localparam int unsigned AW   = (HALF > 1) ? $clog2(HALF) : 1;
  localparam int unsigned DW   = RADIX4 ? 6 * SM_W + 4 : 6 * SM_W;

  typedef enum logic [1:0] {S_IDLE, S_NAT, S_TRACE} phase_t;

  phase_t         phase;
  logic [AW-1:0]  cnt;
  logic           last;

  // ---------------------------------------------------------------------
  // control
  // ---------------------------------------------------------------------
  assign last  = (32'(cnt) == HALF - 1);
  assign busy  = (phase != S_IDLE);
  assign rd_en = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (phase)
        S_IDLE:  if (start) begin phase <= S_NAT; cnt <= '0; end
        S_NAT:   begin cnt <= last ? '0 : cnt + 1'b1; if (last) phase <= S_TRACE; end
        S_TRACE: begin cnt <= last ? '0 : cnt + 1'b1; if (last) phase <= S_IDLE;  end
        default: phase <= S_IDLE;
      endcase
    end
  end

  logic          nat, trace, load;
  logic [AW-1:0] rev;            // HALF-1-cnt
  assign nat   = (phase == S_NAT);
  assign trace = (phase == S_TRACE);
  assign load  = (phase == S_IDLE) && start;
  assign rev   = AW'(HALF - 1) - cnt;

  always_comb begin
    if (trace) begin
      rd_idx_a = IW'(HALF) + IW'(cnt);
      rd_idx_b = IW'(rev);
    end else begin
      rd_idx_a = IW'(cnt);
      rd_idx_b = IW'(L - 1) - IW'(cnt);
    end
  end

  // ---------------------------------------------------------------------
  // branch metrics
  // ---------------------------------------------------------------------
  logic [15:0][BM_W-1:0] gam_a, gam_b;
  bmu u_bmu_a (.sym(sym_a), .gamma(gam_a));
  bmu u_bmu_b (.sym(sym_b), .gamma(gam_b));

  // ---------------------------------------------------------------------
  // natural recursion processors
  // ---------------------------------------------------------------------
  logic [7:0][SM_W-1:0]      alpha_q, beta_q;
  logic [1:0][2:0][SM_W-1:0] dm_a, dm_b, dmr_a, dmr_b;
  logic [1:0][1:0]           sel_a, sel_b, selr_a, selr_b;

  nrp #(.W(SM_W), .BWD(1'b0), .RADIX4(RADIX4), .USE_LUT(USE_LUT)) u_nrp_a (
    .clk, .rst_n, .load, .init(alpha_in), .en(busy), .gamma(gam_a),
    .sm_q(alpha_q), .sm_d(), .dm(dm_a), .sel(sel_a));

  nrp #(.W(SM_W), .BWD(1'b1), .RADIX4(RADIX4), .USE_LUT(USE_LUT)) u_nrp_b (
    .clk, .rst_n, .load, .init(beta_in), .en(busy), .gamma(gam_b),
    .sm_q(beta_q), .sm_d(), .dm(dm_b), .sel(sel_b));

  // ---------------------------------------------------------------------
  // state metric caches (difference metrics)
  // ---------------------------------------------------------------------
  logic [DW-1:0] wd_a, wd_b, rd_a, rd_b;

  if (RADIX4) begin : g_pack4
    assign wd_a = {sel_a, dm_a};
    assign wd_b = {sel_b, dm_b};
    assign {selr_a, dmr_a} = rd_a;
    assign {selr_b, dmr_b} = rd_b;
  end else begin : g_pack22
    assign wd_a   = dm_a;
    assign wd_b   = dm_b;
    assign dmr_a  = rd_a;
    assign dmr_b  = rd_b;
    assign selr_a = '0;
    assign selr_b = '0;
  end

  smc #(.DEPTH(HALF), .DW(DW)) u_smc_a (
    .clk, .we(nat), .waddr(cnt), .wdata(wd_a), .raddr(rev), .rdata(rd_a));
  smc #(.DEPTH(HALF), .DW(DW)) u_smc_b (
    .clk, .we(nat), .waddr(cnt), .wdata(wd_b), .raddr(rev), .rdata(rd_b));

  // ---------------------------------------------------------------------
  // traceback recursion processors
  // upper path: beta traced forward from the lower NRP, using SMC_B
  // lower path: alpha traced backward from the upper NRP, using SMC_A
  // ---------------------------------------------------------------------
  logic                      first;
  logic [7:0][SM_W-1:0]      tb_beta, tb_alpha;
  logic [1:0][3:0][SM_W-1:0] ts_a, ts_b;
  assign first = trace && (cnt == '0);

  trp #(.W(SM_W), .BWD(1'b1), .RADIX4(RADIX4), .USE_LUT(USE_LUT)) u_trp_a (
    .clk, .rst_n, .seed_sel(first), .seed(beta_q), .en(trace),
    .dm(dmr_b), .sel(selr_b), .gamma(gam_a),
    .cur(), .nxt(tb_beta), .sum(ts_a));

  trp #(.W(SM_W), .BWD(1'b0), .RADIX4(RADIX4), .USE_LUT(USE_LUT)) u_trp_b (
    .clk, .rst_n, .seed_sel(first), .seed(alpha_q), .en(trace),
    .dm(dmr_a), .sel(selr_a), .gamma(gam_b),
    .cur(), .nxt(tb_alpha), .sum(ts_b));

  // ---------------------------------------------------------------------
  // a posteriori, extrinsic, hard decision
  // ---------------------------------------------------------------------
  logic [3:1][LLR_W-1:0] llr_a_d, llr_b_d;
  logic [3:1][LA_W-1:0]  ext_a_d, ext_b_d;
  logic [1:0]            hd_a_d, hd_b_d;

  lapo #(.W(SM_W), .TSUM_BWD(1'b1)) u_lapo_a (
    .alpha(alpha_q), .beta(tb_beta), .gamma(gam_a), .tsum(ts_a), .llr(llr_a_d));
  lapo #(.W(SM_W), .TSUM_BWD(1'b0)) u_lapo_b (
    .alpha(tb_alpha), .beta(beta_q), .gamma(gam_b), .tsum(ts_b), .llr(llr_b_d));

  lex #(.LLR_W(LLR_W)) u_lex_a (.llr(llr_a_d), .sym(sym_a), .ext(ext_a_d));
  lex #(.LLR_W(LLR_W)) u_lex_b (.llr(llr_b_d), .sym(sym_b), .ext(ext_b_d));

  hd #(.LLR_W(LLR_W)) u_hd_a (.llr(llr_a_d), .bits(hd_a_d));
  hd #(.LLR_W(LLR_W)) u_hd_b (.llr(llr_b_d), .bits(hd_b_d));

  // ---------------------------------------------------------------------
  // output registers
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      out_idx_a <= '0;
      out_idx_b <= '0;
      llr_a     <= '0;
      llr_b     <= '0;
      ext_a     <= '0;
      ext_b     <= '0;
      hd_a      <= '0;
      hd_b      <= '0;
    end else begin
      out_valid <= trace;
      done      <= trace && last;
      if (trace) begin
        out_idx_a <= rd_idx_a;
        out_idx_b <= rd_idx_b;
        llr_a     <= llr_a_d;
        llr_b     <= llr_b_d;
        ext_a     <= ext_a_d;
        ext_b     <= ext_b_d;
        hd_a      <= hd_a_d;
        hd_b      <= hd_b_d;
      end
    end
  end

  assign alpha_out = alpha_q;
  assign beta_out  = beta_q;

  // The window must split into two equal halves.
  initial assert (L >= 4 && L % 2 == 0)
    else $error("map_decoder: L must be even and at least 4");
endmodule
