// Intra-warp locality (IWL) unit: per-warp working-set estimator and warp
// throttle of the versatile warp scheduler.
//
// Each resident warp has two CNT_W-bit saturating counters: L1 data cache
// accesses, and first-time misses (a miss counts only when the address miss
// table says the block had not missed before).  When a warp finishes, its
// miss count is the new working-set sample WS_new and
// RRDegr_new = accesses / WS_new its cache re-reference degree.  Both feed
// running averages that weigh the newest sample by one half:
//   WS_i = WS_{i-1}/2 + WS_new/2,  RRDegr_i = RRDegr_{i-1}/2 + RRDegr_new/2.
// The number of warps to keep active is
//   N_act = ceil(BETA * L1_BLOCKS / (WS_i * RRDegr_i)), clamped to 1..NUM_WARPS.
// After `launch` the unit is in the sampling stage (all warps active) until
// N_pred warps have finished,
//   N_pred = ceil(ALPHA * N_CTA * Size_CTA / (WARP_SIZE * N_SM)),
// with ALPHA = ALPHA_NUM/ALPHA_DEN; it keeps estimating afterwards.  The AMT
// is cleared (`amt_clear`) every N_pred finished warps.
//
// Fixed point: WS and RRDegr carry FRAC fraction bits.  The first finished
// warp initialises the averages (instead of averaging with zero), a warp with
// no miss counts as WS_new = 1, and N_CTA is the number of CTAs in the grid
// as supplied at launch: these are choices of this design.
// Timing: events are taken at the clock edge; `n_act` is combinational from
// the registered averages.
module iwl #(
  parameter int unsigned NUM_WARPS = 48,
  parameter int unsigned CNT_W     = 10,
  parameter int unsigned L1_BLOCKS = 256,   // 32 KB / 128 B lines
  parameter int unsigned BETA      = 4,
  parameter int unsigned ALPHA_NUM = 1,     // alpha = 0.1
  parameter int unsigned ALPHA_DEN = 10,
  parameter int unsigned N_SM      = 15,
  parameter int unsigned WARP_SIZE = 32,
  parameter int unsigned FRAC      = 4,
  localparam int unsigned WW       = $clog2(NUM_WARPS),
  localparam int unsigned FX_W     = CNT_W + FRAC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            launch,
  input  logic [15:0]     cfg_n_cta,     // CTAs in the grid
  input  logic [10:0]     cfg_cta_size,  // threads per CTA
  input  logic            acc_valid,
  input  logic [WW-1:0]   acc_warp,
  input  logic            miss_valid,
  input  logic [WW-1:0]   miss_warp,
  input  logic            miss_first,    // from the AMT
  input  logic            done_valid,
  input  logic [WW-1:0]   done_warp,
  output logic            sampling,
  output logic            amt_clear,
  output logic [15:0]     n_pred,
  output logic [FX_W-1:0] ws,
  output logic [FX_W-1:0] rrd,
  output logic [WW:0]     n_act
);
  localparam int unsigned CMAX = (1 << CNT_W) - 1;

  logic [CNT_W-1:0] miss_cnt [NUM_WARPS];
  logic [CNT_W-1:0] acc_cnt  [NUM_WARPS];
  logic [15:0]      done_cnt, period_cnt;
  logic             have_est;

  // N_pred from the launch configuration.
  always_comb begin
    logic [63:0] num, den;
    num    = longint'(cfg_n_cta) * longint'(cfg_cta_size) * ALPHA_NUM;
    den    = longint'(ALPHA_DEN) * WARP_SIZE * N_SM;
    n_pred = 16'((num + den - 1) / den);
    if (n_pred == '0) n_pred = 16'd1;
  end

  // N_act from the averages.
  always_comb begin
    logic [63:0] prod, num, q;
    prod = longint'(ws) * longint'(rrd);
    num  = longint'(BETA) * L1_BLOCKS << (2 * FRAC);
    q    = (prod == 0) ? longint'(NUM_WARPS) : (num + prod - 1) / prod;
    if (sampling || !have_est || q > longint'(NUM_WARPS)) q = longint'(NUM_WARPS);
    if (q == 0) q = 1;
    n_act = (WW + 1)'(q);
  end

  assign sampling = (done_cnt < n_pred);

  // Samples of the finishing warp.
  logic [FX_W-1:0] ws_new, rr_new;
  logic [31:0]     m, a;
  always_comb begin
    m      = (miss_cnt[done_warp] == '0) ? 1 : int'(miss_cnt[done_warp]);
    a      = int'(acc_cnt[done_warp]);
    ws_new = FX_W'(m << FRAC);
    rr_new = FX_W'((a << FRAC) / m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NUM_WARPS; w++) begin
        miss_cnt[w] <= '0;
        acc_cnt[w]  <= '0;
      end
      done_cnt   <= '0;
      period_cnt <= '0;
      have_est   <= 1'b0;
      ws         <= '0;
      rrd        <= '0;
      amt_clear  <= 1'b0;
    end else if (launch) begin
      for (int w = 0; w < NUM_WARPS; w++) begin
        miss_cnt[w] <= '0;
        acc_cnt[w]  <= '0;
      end
      done_cnt   <= '0;
      period_cnt <= '0;
      have_est   <= 1'b0;
      ws         <= '0;
      rrd        <= '0;
      amt_clear  <= 1'b1;
    end else begin
      amt_clear <= 1'b0;
      if (acc_valid && int'(acc_cnt[acc_warp]) != CMAX)
        acc_cnt[acc_warp] <= acc_cnt[acc_warp] + 1'b1;
      if (miss_valid && miss_first && int'(miss_cnt[miss_warp]) != CMAX)
        miss_cnt[miss_warp] <= miss_cnt[miss_warp] + 1'b1;
      if (done_valid) begin
        miss_cnt[done_warp] <= '0;
        acc_cnt[done_warp]  <= '0;
        if (!have_est) begin
          ws  <= ws_new;
          rrd <= rr_new;
        end else begin
          ws  <= FX_W'((int'(ws)  + int'(ws_new)) >> 1);
          rrd <= FX_W'((int'(rrd) + int'(rr_new)) >> 1);
        end
        have_est <= 1'b1;
        if (done_cnt != '1) done_cnt <= done_cnt + 1'b1;
        if (period_cnt + 1'b1 >= n_pred) begin
          period_cnt <= '0;
          amt_clear  <= 1'b1;
        end else begin
          period_cnt <= period_cnt + 1'b1;
        end
      end
    end
  end
endmodule
