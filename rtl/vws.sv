// Versatile warp scheduler (VWS) of one SM.
//
// VWS keeps three kinds of L1 data cache locality at once:
//  * intra-warp: iwl estimates the per-warp working set from first-time
//    misses (filtered by the address miss table, amt) and the re-reference
//    degree, and sets how many warps may run (N_act);
//  * intra-CTA: intracl picks those N_act warps from consecutive slots, i.e.
//    from as few CTAs as possible;
//  * inter-CTA: dispatch_queue hands this SM a consecutive run of CTAs, and
//    intercl_sched keeps a first level of at most 16 warps drawn from
//    consecutive CTAs and issues from it greedy-then-oldest.
// The L1 cache, the pipeline and the warp slots are outside: this block takes
// cache events, warp-completion events and per-slot state, and returns the
// warp to issue and the CTA to launch next.
//
// Timing: issue is combinational from the registered level-1 set; all state
// changes at the clock edge.  The L1 block address (`miss_blk`) is the cache
// line address (byte address / 128).
//
// Lint note: the dispatch queue's batch number output (`dq_batch`) is left
// unused on purpose; VWS dispatches with a stride of one, so it equals the
// CTA number already returned on `cta_next`.
module vws #(
  parameter int unsigned NUM_WARPS = 48,
  parameter int unsigned L1_SIZE   = 16,
  parameter int unsigned L1_BLOCKS = 256,
  parameter int unsigned AMT_SIZE  = 8192,
  parameter int unsigned BETA      = 4,
  parameter int unsigned N_SM      = 15,
  localparam int unsigned WW       = $clog2(NUM_WARPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // kernel launch and serial CTA dispatch
  input  logic                 launch,
  input  logic [15:0]          cfg_n_cta,
  input  logic [10:0]          cfg_cta_size,
  input  logic [7:0]           cfg_sm_id,
  input  logic                 cta_pop,
  output logic                 cta_empty,
  output logic [15:0]          cta_next,
  // L1 data cache and warp events
  input  logic                 acc_valid,
  input  logic [WW-1:0]        acc_warp,
  input  logic                 miss_valid,
  input  logic [WW-1:0]        miss_warp,
  input  logic [24:0]          miss_blk,
  input  logic                 done_valid,
  input  logic [WW-1:0]        done_warp,
  // warp slots
  input  logic [NUM_WARPS-1:0] slot_valid,
  input  logic [15:0]          cta_id [NUM_WARPS],
  input  logic [NUM_WARPS-1:0] ready,
  input  logic [NUM_WARPS-1:0] stall,
  // decisions
  output logic                 issue_valid,
  output logic [WW-1:0]        issue_warp,
  output logic [WW:0]          n_act,
  output logic [15:0]          n_pred,     // warps sampled before throttling
  output logic [13:0]          ws,         // working set, 4 fraction bits
  output logic [13:0]          rrd,        // re-reference degree, 4 fraction bits
  output logic [15:0]          cta_left,   // CTAs still queued for this SM
  output logic                 sampling,
  output logic [NUM_WARPS-1:0] active,
  output logic [NUM_WARPS-1:0] level1,
  output logic                 ev_first_miss,
  output logic                 ev_amt_clear,
  output logic                 ev_promote,
  output logic [1:0]           ev_promote_class,
  output logic                 ev_demote
);
  logic        first_miss, amt_clear;
  logic [15:0] dq_batch, dq_head, dq_tail;

  amt #(.ENTRIES(AMT_SIZE), .BLK_W(25)) u_amt (
    .clk, .rst_n,
    .clear     (amt_clear),
    .miss_valid,
    .miss_blk,
    .first_miss
  );

  iwl #(.NUM_WARPS(NUM_WARPS), .CNT_W(10), .L1_BLOCKS(L1_BLOCKS),
        .BETA(BETA), .N_SM(N_SM)) u_iwl (
    .clk, .rst_n,
    .launch,
    .cfg_n_cta,
    .cfg_cta_size,
    .acc_valid, .acc_warp,
    .miss_valid, .miss_warp,
    .miss_first (first_miss),
    .done_valid, .done_warp,
    .sampling,
    .amt_clear,
    .n_pred,
    .ws,
    .rrd,
    .n_act
  );

  intracl #(.NUM_WARPS(NUM_WARPS)) u_intracl (
    .slot_valid,
    .n_act,
    .active
  );

  intercl_sched #(.NUM_WARPS(NUM_WARPS), .L1_SIZE(L1_SIZE), .CTA_W(16)) u_inter (
    .clk, .rst_n,
    .slot_valid,
    .allowed (active),
    .cta_id,
    .ready,
    .stall,
    .issue_valid,
    .issue_warp,
    .level1,
    .ev_promote,
    .ev_promote_class,
    .ev_demote
  );

  dispatch_queue #(.ID_W(16)) u_dq (
    .clk, .rst_n,
    .launch,
    .n_tb     (cfg_n_cta),
    .n_sm     (8'(N_SM)),
    .sm_id    (cfg_sm_id),
    .stride   (16'd1),
    .pop      (cta_pop),
    .empty    (cta_empty),
    .tb_id    (cta_next),
    .batch_id (dq_batch),
    .head     (dq_head),
    .tail     (dq_tail)
  );

  // With a stride of one the batch number equals the CTA number.
  assign cta_left      = dq_tail - dq_head;
  assign ev_first_miss = first_miss;
  assign ev_amt_clear  = amt_clear;
endmodule
