// Memory-side logic of one GPU streaming multiprocessor, optimised at three
// levels of the memory hierarchy.
//
//  * Register file (rf_*): a register file built from racetrack memory, with
//    register remapping, RM-aware warp scheduling and a write buffer
//    (rmws_rf).
//  * L1 data cache (vws_*): the versatile warp scheduler, which throttles and
//    groups warps to keep intra-warp, intra-CTA and inter-CTA locality (vws).
//  * DRAM (temp_*): thread-batch memory partitioning with thread-batch-aware
//    scheduling (temp_tbas).
// The three are independent mechanisms: each has its own ports here, and the
// pipeline, caches, memory controller and DRAM that would connect them are
// outside this design.  The RF section uses its own issue logic (RMWS); the
// VWS and TBAS sections each return their own warp choice.  Parameters
// default to the evaluated configurations: 48 warps, 16 banks of 64 warp
// registers of 1024 bits, 4-port 64-bit racetracks, 2 write-buffer entries
// per bank; 15 SMs, 32 KB L1 for VWS; 8 SMs, 2 channels x 16 banks for TEMP.
// Timing is that of the three sections (see their files); this level adds no
// logic.  Lint note: Verilator reports `rst_n` as both an asynchronous reset
// and a synchronous signal because the write-buffer and queue assertions use
// it in `disable iff`; the assertions are not part of the circuit.
module vmo_gpu_top #(
  parameter int unsigned NUM_WARPS = 48,
  parameter int unsigned NUM_BANKS = 16,
  parameter int unsigned ENTRIES   = 64,
  parameter int unsigned PORTS     = 4,
  parameter int unsigned DATA_W    = 1024,
  parameter int unsigned WAYS      = 2,
  parameter int unsigned NUM_SCHED = 1,
  parameter int unsigned VWS_N_SM  = 15,
  parameter int unsigned TEMP_N_SM = 8,
  localparam int unsigned MAX_SRC  = gpu_pkg::MAX_SRC,
  localparam int unsigned SEG      = ENTRIES / PORTS,
  localparam int unsigned BW       = $clog2(SEG),
  localparam int unsigned BKW      = $clog2(NUM_BANKS),
  localparam int unsigned YW       = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WW       = $clog2(NUM_WARPS),
  localparam int unsigned SMW      = (TEMP_N_SM > 1) ? $clog2(TEMP_N_SM) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ================= racetrack register file =================
  input  logic [5:0]           rf_cfg_num_reg_warp,
  input  logic [BW-1:0]        rf_cfg_offset,
  input  logic [NUM_WARPS-1:0] rf_ib_valid,
  input  logic                 rf_ib_dst_valid [NUM_WARPS],
  input  logic [5:0]           rf_ib_dst_reg   [NUM_WARPS],
  input  logic                 rf_ib_src_valid [NUM_WARPS][MAX_SRC],
  input  logic [5:0]           rf_ib_src_reg   [NUM_WARPS][MAX_SRC],
  output logic                 rf_iss_valid,
  output logic [WW-1:0]        rf_iss_warp,
  output logic [SEG-1:0]       rf_iss_score,
  output logic [BKW-1:0]       rf_iss_dst_bank,
  output logic [YW-1:0]        rf_iss_dst_way,
  output logic                 rf_opnd_valid [NUM_BANKS],
  output logic [7:0]           rf_opnd_tag   [NUM_BANKS],
  output logic [DATA_W-1:0]    rf_opnd_data  [NUM_BANKS],
  input  logic                 rf_wb_valid,
  input  logic [BKW-1:0]       rf_wb_bank,
  input  logic [YW-1:0]        rf_wb_way,
  input  logic [DATA_W-1:0]    rf_wb_data,
  output logic [NUM_BANKS-1:0] rf_ev_wb_read,
  output logic [NUM_BANKS-1:0] rf_ev_piggyback,
  output logic [NUM_BANKS-1:0] rf_ev_overflow,
  output logic [NUM_BANKS-1:0] rf_ev_rf_read,
  output logic [NUM_BANKS-1:0] rf_ev_shift,
  output logic [NUM_BANKS-1:0] rf_ev_shift_dir,
  output logic [BW-1:0]        rf_plan_bml [NUM_BANKS],
  output logic [WAYS-1:0]      rf_wb_occupied [NUM_BANKS],
  output logic                 rf_ev_void,
  output logic                 rf_ev_stall_full,
  output logic                 rf_ev_stall_hazard,
  // ================= versatile warp scheduler =================
  input  logic                 vws_launch,
  input  logic [15:0]          vws_cfg_n_cta,
  input  logic [10:0]          vws_cfg_cta_size,
  input  logic [7:0]           vws_cfg_sm_id,
  input  logic                 vws_cta_pop,
  output logic                 vws_cta_empty,
  output logic [15:0]          vws_cta_next,
  input  logic                 vws_acc_valid,
  input  logic [WW-1:0]        vws_acc_warp,
  input  logic                 vws_miss_valid,
  input  logic [WW-1:0]        vws_miss_warp,
  input  logic [24:0]          vws_miss_blk,
  input  logic                 vws_done_valid,
  input  logic [WW-1:0]        vws_done_warp,
  input  logic [NUM_WARPS-1:0] vws_slot_valid,
  input  logic [15:0]          vws_cta_id [NUM_WARPS],
  input  logic [NUM_WARPS-1:0] vws_ready,
  input  logic [NUM_WARPS-1:0] vws_stall,
  output logic                 vws_issue_valid,
  output logic [WW-1:0]        vws_issue_warp,
  output logic [WW:0]          vws_n_act,
  output logic [15:0]          vws_n_pred,
  output logic [13:0]          vws_ws,
  output logic [13:0]          vws_rrd,
  output logic [15:0]          vws_cta_left,
  output logic                 vws_sampling,
  output logic [NUM_WARPS-1:0] vws_active,
  output logic [NUM_WARPS-1:0] vws_level1,
  output logic                 vws_ev_first_miss,
  output logic                 vws_ev_amt_clear,
  output logic                 vws_ev_promote,
  output logic [1:0]           vws_ev_promote_class,
  output logic                 vws_ev_demote,
  // ================= TEMP + TBAS =================
  input  logic                 temp_launch,
  input  logic [15:0]          temp_cfg_n_tb,
  input  logic [SMW-1:0]       temp_cfg_sm_id,
  input  logic [15:0]          temp_cfg_stride,
  input  logic                 temp_tb_pop,
  output logic                 temp_tb_empty,
  output logic [15:0]          temp_tb_next,
  output logic [15:0]          temp_tb_next_batch,
  output logic [15:0]          temp_tb_left,
  input  logic [NUM_WARPS-1:0] temp_slot_valid,
  input  logic [15:0]          temp_batch_id [NUM_WARPS],
  input  logic [NUM_WARPS-1:0] temp_ready,
  input  logic [NUM_WARPS-1:0] temp_stall,
  output logic                 temp_issue_valid,
  output logic [WW-1:0]        temp_issue_warp,
  output logic                 temp_cur_valid,
  output logic [15:0]          temp_cur_batch,
  output logic                 temp_ev_switch,
  input  logic [31:0]          temp_mem_addr,
  output logic                 temp_mem_channel,
  output logic [3:0]           temp_mem_bank,
  output logic [14:0]          temp_mem_row,
  output logic                 temp_mem_local,
  output logic [11:0]          temp_mem_column,
  output logic [SMW-1:0]       temp_mem_owner,
  input  logic                 temp_alloc_cpu,
  input  logic [19:0]          temp_alloc_seq,
  output logic [19:0]          temp_alloc_frame
);
  rmws_rf #(.NUM_WARPS(NUM_WARPS), .NUM_BANKS(NUM_BANKS), .ENTRIES(ENTRIES),
            .PORTS(PORTS), .DATA_W(DATA_W), .WAYS(WAYS),
            .NUM_SCHED(NUM_SCHED)) u_rf (
    .clk, .rst_n,
    .cfg_num_reg_warp (rf_cfg_num_reg_warp),
    .cfg_offset       (rf_cfg_offset),
    .ib_valid         (rf_ib_valid),
    .ib_dst_valid     (rf_ib_dst_valid),
    .ib_dst_reg       (rf_ib_dst_reg),
    .ib_src_valid     (rf_ib_src_valid),
    .ib_src_reg       (rf_ib_src_reg),
    .iss_valid        (rf_iss_valid),
    .iss_warp         (rf_iss_warp),
    .iss_score        (rf_iss_score),
    .iss_dst_bank     (rf_iss_dst_bank),
    .iss_dst_way      (rf_iss_dst_way),
    .opnd_valid       (rf_opnd_valid),
    .opnd_tag         (rf_opnd_tag),
    .opnd_data        (rf_opnd_data),
    .wb_valid         (rf_wb_valid),
    .wb_bank          (rf_wb_bank),
    .wb_way           (rf_wb_way),
    .wb_data          (rf_wb_data),
    .ev_wb_read       (rf_ev_wb_read),
    .ev_piggyback     (rf_ev_piggyback),
    .ev_overflow      (rf_ev_overflow),
    .ev_rf_read       (rf_ev_rf_read),
    .ev_shift         (rf_ev_shift),
    .ev_shift_dir     (rf_ev_shift_dir),
    .plan_bml         (rf_plan_bml),
    .wb_occupied      (rf_wb_occupied),
    .ev_void          (rf_ev_void),
    .ev_stall_full    (rf_ev_stall_full),
    .ev_stall_hazard  (rf_ev_stall_hazard)
  );

  vws #(.NUM_WARPS(NUM_WARPS), .N_SM(VWS_N_SM)) u_vws (
    .clk, .rst_n,
    .launch          (vws_launch),
    .cfg_n_cta       (vws_cfg_n_cta),
    .cfg_cta_size    (vws_cfg_cta_size),
    .cfg_sm_id       (vws_cfg_sm_id),
    .cta_pop         (vws_cta_pop),
    .cta_empty       (vws_cta_empty),
    .cta_next        (vws_cta_next),
    .acc_valid       (vws_acc_valid),
    .acc_warp        (vws_acc_warp),
    .miss_valid      (vws_miss_valid),
    .miss_warp       (vws_miss_warp),
    .miss_blk        (vws_miss_blk),
    .done_valid      (vws_done_valid),
    .done_warp       (vws_done_warp),
    .slot_valid      (vws_slot_valid),
    .cta_id          (vws_cta_id),
    .ready           (vws_ready),
    .stall           (vws_stall),
    .issue_valid     (vws_issue_valid),
    .issue_warp      (vws_issue_warp),
    .n_act           (vws_n_act),
    .n_pred          (vws_n_pred),
    .ws              (vws_ws),
    .rrd             (vws_rrd),
    .cta_left        (vws_cta_left),
    .sampling        (vws_sampling),
    .active          (vws_active),
    .level1          (vws_level1),
    .ev_first_miss   (vws_ev_first_miss),
    .ev_amt_clear    (vws_ev_amt_clear),
    .ev_promote      (vws_ev_promote),
    .ev_promote_class(vws_ev_promote_class),
    .ev_demote       (vws_ev_demote)
  );

  temp_tbas #(.NUM_WARPS(NUM_WARPS), .N_SM(TEMP_N_SM), .CHANNELS(2),
              .BANKS(16), .ADDR_W(32)) u_temp (
    .clk, .rst_n,
    .launch        (temp_launch),
    .cfg_n_tb      (temp_cfg_n_tb),
    .cfg_sm_id     (temp_cfg_sm_id),
    .cfg_stride    (temp_cfg_stride),
    .tb_pop        (temp_tb_pop),
    .tb_empty      (temp_tb_empty),
    .tb_next       (temp_tb_next),
    .tb_next_batch (temp_tb_next_batch),
    .tb_left       (temp_tb_left),
    .slot_valid    (temp_slot_valid),
    .batch_id      (temp_batch_id),
    .ready         (temp_ready),
    .stall         (temp_stall),
    .issue_valid   (temp_issue_valid),
    .issue_warp    (temp_issue_warp),
    .cur_valid     (temp_cur_valid),
    .cur_batch     (temp_cur_batch),
    .ev_switch     (temp_ev_switch),
    .mem_addr      (temp_mem_addr),
    .mem_channel   (temp_mem_channel),
    .mem_bank      (temp_mem_bank),
    .mem_row       (temp_mem_row),
    .mem_local     (temp_mem_local),
    .mem_column    (temp_mem_column),
    .mem_owner     (temp_mem_owner),
    .alloc_cpu     (temp_alloc_cpu),
    .alloc_seq     (temp_alloc_seq),
    .alloc_frame   (temp_alloc_frame)
  );
endmodule
