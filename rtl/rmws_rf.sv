// Racetrack-memory register file of one SM with RM-aware issue.
//
// This block joins the issue stage and the operand-collection stage of the
// SM around a register file whose banks are racetracks:
//   * bml_calc (one per operand of every warp) gives each register its bank,
//     access port and bit-map location under register remapping;
//   * rmws_sched picks the warp whose reads need the least shifting;
//   * wbit checks the picked instruction against the write buffer (RAW, WAW,
//     full set) and tracks every WBDA way;
//   * one rf_arbiter per bank queues the reads in issue order, answers reads
//     from the write buffer, performs piggyback and overflow writebacks and
//     drives its rm_bank.
// The instruction buffer, collector units and execution units are outside:
// each warp presents its next instruction (`ib_*`), operands come back per
// bank tagged {warp, operand slot}, and results return through `wb_*`
// carrying the write-buffer way handed out at issue (`iss_dst_*`).
//
// Issue protocol: an instruction issues in the cycle `iss_valid` is high;
// the instruction buffer must then retire it.  When the write buffer rejects
// the scheduler's pick, that warp is skipped until the next issue or write-
// buffer update, so the search moves on to the next-best score over the
// following cycles.  Issue also waits until every bank queue has room for
// MAX_SRC reads.  The rejection mask and the queue-room rule are this
// design's choices; everything else follows the described pipeline.
// NUM_SCHED > 1 selects the warp-register remapping of a multi-scheduler
// SM (each warp's registers in its scheduler's bank group); this block still
// holds a single scheduler issuing one instruction per cycle.
module rmws_rf #(
  parameter int unsigned NUM_WARPS = gpu_pkg::NUM_WARPS,
  parameter int unsigned NUM_BANKS = gpu_pkg::NUM_BANKS,
  parameter int unsigned ENTRIES   = gpu_pkg::ENTRIES,
  parameter int unsigned PORTS     = gpu_pkg::PORTS,
  parameter int unsigned DATA_W    = gpu_pkg::DATA_W,
  parameter int unsigned WAYS      = gpu_pkg::WB_WAYS,
  parameter int unsigned NUM_SCHED = 1,
  localparam int unsigned MAX_SRC  = gpu_pkg::MAX_SRC,
  localparam int unsigned SEG      = ENTRIES / PORTS,
  localparam int unsigned BW       = $clog2(SEG),
  localparam int unsigned PW       = (PORTS > 1) ? $clog2(PORTS) : 1,
  localparam int unsigned BKW      = $clog2(NUM_BANKS),
  localparam int unsigned YW       = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WW       = $clog2(NUM_WARPS),
  localparam int unsigned TAG_W    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // kernel-launch configuration
  input  logic [5:0]        cfg_num_reg_warp,
  input  logic [BW-1:0]     cfg_offset,
  // instruction buffer: next instruction of every warp
  input  logic [NUM_WARPS-1:0] ib_valid,
  input  logic              ib_dst_valid [NUM_WARPS],
  input  logic [5:0]        ib_dst_reg   [NUM_WARPS],
  input  logic              ib_src_valid [NUM_WARPS][MAX_SRC],
  input  logic [5:0]        ib_src_reg   [NUM_WARPS][MAX_SRC],
  // issue
  output logic              iss_valid,
  output logic [WW-1:0]     iss_warp,
  output logic [SEG-1:0]    iss_score,
  output logic [BKW-1:0]    iss_dst_bank,
  output logic [YW-1:0]     iss_dst_way,
  // operands to the collector units, one port per bank
  output logic              opnd_valid [NUM_BANKS],
  output logic [TAG_W-1:0]  opnd_tag   [NUM_BANKS],
  output logic [DATA_W-1:0] opnd_data  [NUM_BANKS],
  // results from the writeback stage
  input  logic              wb_valid,
  input  logic [BKW-1:0]    wb_bank,
  input  logic [YW-1:0]     wb_way,
  input  logic [DATA_W-1:0] wb_data,
  // event pulses (statistics)
  output logic [NUM_BANKS-1:0] ev_wb_read,
  output logic [NUM_BANKS-1:0] ev_piggyback,
  output logic [NUM_BANKS-1:0] ev_overflow,
  output logic [NUM_BANKS-1:0] ev_rf_read,
  output logic [NUM_BANKS-1:0] ev_shift,
  output logic [NUM_BANKS-1:0] ev_shift_dir,
  // where each bank's tracks will be once its queued reads are served, and
  // which write-buffer ways are occupied
  output logic [BW-1:0]     plan_bml     [NUM_BANKS],
  output logic [WAYS-1:0]   wb_occupied  [NUM_BANKS],
  output logic              ev_void,
  output logic              ev_stall_full,
  output logic              ev_stall_hazard
);
  // ---------------- operand locations ----------------
  logic [BKW-1:0] src_bank [NUM_WARPS][MAX_SRC];
  logic [PW-1:0]  src_port [NUM_WARPS][MAX_SRC];
  logic [BW-1:0]  src_bml  [NUM_WARPS][MAX_SRC];
  logic [BKW-1:0] dst_bank [NUM_WARPS];
  logic [PW-1:0]  dst_port [NUM_WARPS];
  logic [BW-1:0]  dst_bml  [NUM_WARPS];

  for (genvar w = 0; w < NUM_WARPS; w++) begin : g_loc
    for (genvar s = 0; s < MAX_SRC; s++) begin : g_src
      bml_calc #(.NUM_BANKS(NUM_BANKS), .PORTS(PORTS), .SEG(SEG),
                 .NUM_SCHED(NUM_SCHED)) u_src (
        .warp(6'(w)), .regid(ib_src_reg[w][s]),
        .num_reg_warp(cfg_num_reg_warp), .offset(cfg_offset),
        .bank(src_bank[w][s]), .port(src_port[w][s]), .bml(src_bml[w][s]));
    end
    bml_calc #(.NUM_BANKS(NUM_BANKS), .PORTS(PORTS), .SEG(SEG),
               .NUM_SCHED(NUM_SCHED)) u_dst (
      .warp(6'(w)), .regid(ib_dst_reg[w]),
      .num_reg_warp(cfg_num_reg_warp), .offset(cfg_offset),
      .bank(dst_bank[w]), .port(dst_port[w]), .bml(dst_bml[w]));
  end

  // ---------------- scheduler ----------------
  logic [NUM_WARPS-1:0] rejected, eligible;
  logic                 room;
  logic [$clog2(8+1)-1:0] q_free [NUM_BANKS];
  logic                 pick_valid;
  logic [WW-1:0]        pick;
  logic                 can_issue, fire;

  always_comb begin
    room = 1'b1;
    for (int b = 0; b < NUM_BANKS; b++)
      if (int'(q_free[b]) < MAX_SRC) room = 1'b0;
  end
  assign eligible = room ? (ib_valid & ~rejected) : '0;

  rmws_sched #(.NUM_WARPS(NUM_WARPS), .NUM_BANKS(NUM_BANKS), .SEG(SEG),
               .MAX_SRC(MAX_SRC)) u_sched (
    .clk, .rst_n,
    .eligible,
    .src_valid (ib_src_valid),
    .src_bank,
    .src_bml,
    .issue_ack (can_issue),
    .issue_valid(pick_valid),
    .issue_warp (pick),
    .issue_score(iss_score),
    .bank_bml   (plan_bml)
  );

  // ---------------- write buffer info table ----------------
  logic              src_hit [MAX_SRC];
  logic [YW-1:0]     src_way [MAX_SRC];
  logic [YW-1:0]     dst_way;
  logic              dst_void, stall_full, stall_hazard, ovf_req;
  logic [BKW-1:0]    ovf_bank;
  logic [YW-1:0]     ovf_way;
  logic [NUM_BANKS-1:0] rd_done, wb_done;
  logic [YW-1:0]     rd_done_way [NUM_BANKS];
  logic [YW-1:0]     wb_done_way [NUM_BANKS];
  logic [WAYS-1:0]   way_ready [NUM_BANKS];
  logic              chk_src_valid [MAX_SRC];
  logic [5:0]        chk_src_reg   [MAX_SRC];
  logic [BKW-1:0]    chk_src_bank  [MAX_SRC];

  always_comb begin
    for (int s = 0; s < MAX_SRC; s++) begin
      chk_src_valid[s] = pick_valid && ib_src_valid[pick][s];
      chk_src_reg[s]   = ib_src_reg[pick][s];
      chk_src_bank[s]  = src_bank[pick][s];
    end
  end

  wbit #(.NUM_BANKS(NUM_BANKS), .WAYS(WAYS), .MAX_SRC(MAX_SRC)) u_wbit (
    .clk, .rst_n,
    .chk_warp      (6'(pick)),
    .chk_dst_valid (pick_valid && ib_dst_valid[pick]),
    .chk_dst_reg   (ib_dst_reg[pick]),
    .chk_dst_bank  (dst_bank[pick]),
    .chk_src_valid,
    .chk_src_reg,
    .chk_src_bank,
    .can_issue,
    .stall_full,
    .stall_hazard,
    .src_hit,
    .src_way,
    .dst_way,
    .dst_void,
    .ovf_req,
    .ovf_bank,
    .ovf_way,
    .issue_fire    (pick_valid),
    .rd_done,
    .rd_done_way,
    .wr_data       (wb_valid),
    .wr_data_bank  (wb_bank),
    .wr_data_way   (wb_way),
    .wb_done,
    .wb_done_way,
    .way_ready,
    .way_valid     (wb_occupied)
  );

  assign fire            = pick_valid && can_issue;
  assign iss_valid       = fire;
  assign iss_warp        = pick;
  assign iss_dst_bank    = dst_bank[pick];
  assign iss_dst_way     = dst_way;
  assign ev_void         = fire && dst_void;
  assign ev_stall_full   = pick_valid && stall_full;
  assign ev_stall_hazard = pick_valid && stall_hazard;

  // Skip a rejected warp until something changes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rejected <= '0;
    else if (fire || rd_done != '0 || wb_done != '0 || wb_valid)
      rejected <= '0;
    else if (pick_valid && !can_issue)
      rejected[pick] <= 1'b1;
  end

  // ---------------- banks ----------------
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic              rd_valid   [MAX_SRC];
    logic              rd_from_wb [MAX_SRC];
    logic [YW-1:0]     rd_way     [MAX_SRC];
    logic [PW-1:0]     rd_port    [MAX_SRC];
    logic [BW-1:0]     rd_bml     [MAX_SRC];
    logic [TAG_W-1:0]  rd_tag     [MAX_SRC];

    always_comb begin
      for (int s = 0; s < MAX_SRC; s++) begin
        rd_valid[s]   = fire && ib_src_valid[pick][s] &&
                        int'(src_bank[pick][s]) == b;
        rd_from_wb[s] = src_hit[s];
        rd_way[s]     = src_way[s];
        rd_port[s]    = src_port[pick][s];
        rd_bml[s]     = src_bml[pick][s];
        rd_tag[s]     = TAG_W'({6'(pick), 2'(s)});
      end
    end

    rf_arbiter #(.ENTRIES(ENTRIES), .PORTS(PORTS), .DATA_W(DATA_W),
                 .WAYS(WAYS), .MAX_SRC(MAX_SRC), .QDEPTH(8),
                 .TAG_W(TAG_W)) u_arb (
      .clk, .rst_n,
      .rd_valid, .rd_from_wb, .rd_way, .rd_port, .rd_bml, .rd_tag,
      .q_free      (q_free[b]),
      .alloc_valid (fire && ib_dst_valid[pick] && int'(dst_bank[pick]) == b),
      .alloc_way   (dst_way),
      .alloc_port  (dst_port[pick]),
      .alloc_bml   (dst_bml[pick]),
      .wdata_valid (wb_valid && int'(wb_bank) == b),
      .wdata_way   (wb_way),
      .wdata       (wb_data),
      .way_ready   (way_ready[b]),
      .ovf_req     (ovf_req && int'(ovf_bank) == b),
      .ovf_way,
      .rsp_valid   (opnd_valid[b]),
      .rsp_tag     (opnd_tag[b]),
      .rsp_data    (opnd_data[b]),
      .rd_done     (rd_done[b]),
      .rd_done_way (rd_done_way[b]),
      .wb_done     (wb_done[b]),
      .wb_done_way (wb_done_way[b]),
      .ev_wb_read  (ev_wb_read[b]),
      .ev_piggyback(ev_piggyback[b]),
      .ev_overflow (ev_overflow[b]),
      .ev_rf_read  (ev_rf_read[b]),
      .ev_shift    (ev_shift[b]),
      .ev_shift_dir(ev_shift_dir[b])
    );
  end
endmodule
