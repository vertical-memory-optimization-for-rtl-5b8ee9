// Thread-batch memory partitioning (TEMP) with thread-batch-aware
// scheduling (TBAS), per SM.
//
// TEMP makes the DRAM traffic of different SMs land in different banks:
// consecutive thread blocks, which share pages, are grouped into thread
// batches (tb_id / stride) and dispatched serially to one SM
// (dispatch_queue), and page colouring (page_color_map) places the pages an
// SM touches in the banks that SM owns.  TBAS (tbas_sched) then runs one
// thread batch at a time and promotes the oldest waiting batch, so the open
// DRAM row keeps being hit.
//
// The thread-block slots, the warps and the memory controller are outside:
// the block returns the next thread block and its batch, the warp to issue,
// and decodes DRAM addresses / composes page frames for allocation.  Timing
// is that of the three sub-blocks (combinational outputs, state at the clock
// edge).
module temp_tbas #(
  parameter int unsigned NUM_WARPS = 48,
  parameter int unsigned N_SM      = 8,
  parameter int unsigned CHANNELS  = 2,
  parameter int unsigned BANKS     = 16,
  parameter int unsigned ADDR_W    = 32,
  localparam int unsigned WW       = $clog2(NUM_WARPS),
  localparam int unsigned SMW      = (N_SM > 1) ? $clog2(N_SM) : 1,
  localparam int unsigned CHW      = (CHANNELS > 1) ? $clog2(CHANNELS) : 1,
  localparam int unsigned BKW      = $clog2(BANKS),
  localparam int unsigned ROW_W    = ADDR_W - 12 - $clog2(CHANNELS * BANKS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // kernel launch and serial thread-block dispatch
  input  logic                 launch,
  input  logic [15:0]          cfg_n_tb,
  input  logic [SMW-1:0]       cfg_sm_id,
  input  logic [15:0]          cfg_stride,
  input  logic                 tb_pop,
  output logic                 tb_empty,
  output logic [15:0]          tb_next,
  output logic [15:0]          tb_next_batch,
  output logic [15:0]          tb_left,       // thread blocks still queued
  // warp slots
  input  logic [NUM_WARPS-1:0] slot_valid,
  input  logic [15:0]          batch_id [NUM_WARPS],
  input  logic [NUM_WARPS-1:0] ready,
  input  logic [NUM_WARPS-1:0] stall,
  output logic                 issue_valid,
  output logic [WW-1:0]        issue_warp,
  output logic                 cur_valid,
  output logic [15:0]          cur_batch,
  output logic                 ev_switch,
  // DRAM address decode for a memory request of this SM
  input  logic [ADDR_W-1:0]    mem_addr,
  output logic [CHW-1:0]       mem_channel,
  output logic [BKW-1:0]       mem_bank,
  output logic [ROW_W-1:0]     mem_row,
  output logic                 mem_local,
  output logic [11:0]          mem_column,    // byte within the 4 KB page
  output logic [SMW-1:0]       mem_owner,     // SM owning the colour
  // page frame for the seq-th page allocated to this SM (or to the CPU)
  input  logic                 alloc_cpu,
  input  logic [ADDR_W-13:0]   alloc_seq,
  output logic [ADDR_W-13:0]   alloc_frame
);
  logic [15:0]    dq_head, dq_tail;

  assign tb_left = dq_tail - dq_head;

  dispatch_queue #(.ID_W(16)) u_dq (
    .clk, .rst_n,
    .launch,
    .n_tb     (cfg_n_tb),
    .n_sm     (8'(N_SM)),
    .sm_id    (8'(cfg_sm_id)),
    .stride   (cfg_stride),
    .pop      (tb_pop),
    .empty    (tb_empty),
    .tb_id    (tb_next),
    .batch_id (tb_next_batch),
    .head     (dq_head),
    .tail     (dq_tail)
  );

  tbas_sched #(.NUM_WARPS(NUM_WARPS), .BATCH_W(16)) u_tbas (
    .clk, .rst_n,
    .slot_valid,
    .batch_id,
    .ready,
    .stall,
    .issue_valid,
    .issue_warp,
    .cur_valid,
    .cur_batch,
    .ev_switch
  );

  page_color_map #(.ADDR_W(ADDR_W), .PAGE_BITS(12), .CHANNELS(CHANNELS),
                   .BANKS(BANKS), .N_SM(N_SM)) u_map (
    .addr        (mem_addr),
    .req_sm      (cfg_sm_id),
    .channel     (mem_channel),
    .bank        (mem_bank),
    .row         (mem_row),
    .column      (mem_column),
    .owner_sm    (mem_owner),
    .local_access(mem_local),
    .alloc_sm    (cfg_sm_id),
    .alloc_cpu,
    .seq         (alloc_seq),
    .frame       (alloc_frame)
  );
endmodule
