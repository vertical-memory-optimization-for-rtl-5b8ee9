// Write buffer info table (WBIT), the scoreboard half of the write buffer.
//
// The write buffer holds results on their way to the racetrack RF so that
// writes never disturb the in-order read stream the scheduler plans with.
// Its data live in the per-bank arbitrators (WBDA); this table tracks them.
// It is set-associative: one set per RF bank, WAYS ways per set.  Each entry
// has V (valid), R (data received), the warp and register ID of the pending
// write, and F, the number of issued reads still to read the entry.
//
// Issue check (combinational, for the instruction the scheduler proposes):
//  * a source that matches an entry with R=0 is a RAW hazard: no issue;
//    with R=1 it will be read from the write buffer (`src_hit`, `src_way`)
//    and F is incremented at issue;
//  * a destination that matches an entry is a WAW case: with R=1 and F=0 the
//    old entry is voided and reused (the old value is never written to the
//    RF); with R=0 or F>0 it is a hazard: no issue.  If the same
//    instruction also reads that entry, voiding it would overwrite the value
//    before it is read, so the entry is written back first (overflow
//    request for that way) and the instruction waits;
//  * otherwise the destination needs a free way of its bank's set; when none
//    is free the buffer is full.  If a way of that set is ready to leave
//    (V=1, R=1, F=0) an overflow writeback of it is requested (`ovf_req`)
//    and the instruction waits for the way to be recycled.
// Updates: `rd_done` decrements F, `wr_data` sets R, `wb_done` clears V.
// Several updates may hit one entry in one cycle; all are applied.
//
// Timing: the check is combinational, all updates land at the clock edge.
// Field widths follow the described table; choosing the lowest free way and
// the lowest ready way for overflow is this design's choice.
// Lint note: `rst_n` also disables the in-flight-read assertion
// (`disable iff`), which Verilator reports as a reset used both
// asynchronously and synchronously; the assertion is not part of the circuit.
module wbit #(
  parameter int unsigned NUM_BANKS = gpu_pkg::NUM_BANKS,
  parameter int unsigned WAYS      = gpu_pkg::WB_WAYS,
  parameter int unsigned MAX_SRC   = gpu_pkg::MAX_SRC,
  localparam int unsigned BKW      = $clog2(NUM_BANKS),
  localparam int unsigned YW       = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // issue check
  input  logic [5:0]            chk_warp,
  input  logic                  chk_dst_valid,
  input  logic [5:0]            chk_dst_reg,
  input  logic [BKW-1:0]        chk_dst_bank,
  input  logic                  chk_src_valid [MAX_SRC],
  input  logic [5:0]            chk_src_reg   [MAX_SRC],
  input  logic [BKW-1:0]        chk_src_bank  [MAX_SRC],
  output logic                  can_issue,
  output logic                  stall_full,
  output logic                  stall_hazard,
  output logic                  src_hit [MAX_SRC],
  output logic [YW-1:0]         src_way [MAX_SRC],
  output logic [YW-1:0]         dst_way,
  output logic                  dst_void,      // WAW: old entry reused
  output logic                  ovf_req,       // overflow writeback wanted
  output logic [BKW-1:0]        ovf_bank,
  output logic [YW-1:0]         ovf_way,
  input  logic                  issue_fire,    // the checked instr. issues
  // updates from the arbitrators and the writeback stage
  input  logic [NUM_BANKS-1:0]  rd_done,
  input  logic [YW-1:0]         rd_done_way [NUM_BANKS],
  input  logic                  wr_data,
  input  logic [BKW-1:0]        wr_data_bank,
  input  logic [YW-1:0]         wr_data_way,
  input  logic [NUM_BANKS-1:0]  wb_done,
  input  logic [YW-1:0]         wb_done_way [NUM_BANKS],
  // state for the arbitrators
  output logic [WAYS-1:0]       way_ready [NUM_BANKS], // V & R & F==0
  output logic [WAYS-1:0]       way_valid [NUM_BANKS]
);
  import gpu_pkg::wbit_entry_t;
  localparam int unsigned FMAX = (1 << gpu_pkg::F_W) - 1;

  wbit_entry_t tab   [NUM_BANKS][WAYS];
  wbit_entry_t tab_n [NUM_BANKS][WAYS];
  wbit_entry_t eu;
  logic [31:0] inc;

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++)
      for (int y = 0; y < WAYS; y++) begin
        way_valid[b][y] = tab[b][y].v;
        way_ready[b][y] = tab[b][y].v && tab[b][y].r && tab[b][y].f == '0;
      end
  end

  // ---------------- issue check ----------------
  always_comb begin
    logic dst_match, free_found, rdy_found, raw_haz, self_rd;
    wbit_entry_t e;
    e            = '0;
    stall_hazard = 1'b0;
    raw_haz      = 1'b0;
    self_rd      = 1'b0;
    dst_match    = 1'b0;
    free_found   = 1'b0;
    rdy_found    = 1'b0;
    dst_way      = '0;
    dst_void     = 1'b0;
    ovf_way      = '0;
    for (int s = 0; s < MAX_SRC; s++) begin
      src_hit[s] = 1'b0;
      src_way[s] = '0;
      if (chk_src_valid[s])
        for (int y = 0; y < WAYS; y++) begin
          e = tab[chk_src_bank[s]][y];
          if (e.v && e.warp == chk_warp && e.regid == chk_src_reg[s]) begin
            if (!e.r || int'(e.f) > FMAX - MAX_SRC) raw_haz = 1'b1;  // RAW
            else begin
              src_hit[s] = 1'b1;
              src_way[s] = YW'(y);
            end
          end
        end
    end
    if (chk_dst_valid) begin
      for (int y = 0; y < WAYS; y++) begin
        e = tab[chk_dst_bank][y];
        if (e.v && e.warp == chk_warp && e.regid == chk_dst_reg) begin
          dst_match = 1'b1;
          dst_way   = YW'(y);
          if (!e.r || e.f != '0) stall_hazard = 1'b1;              // WAW
          else                   dst_void     = 1'b1;
        end
      end
      // The instruction reads the entry it would void: its read would find
      // the new value.  Write the entry back first and read it from the RF.
      for (int s = 0; s < MAX_SRC; s++)
        if (dst_void && src_hit[s] && chk_src_bank[s] == chk_dst_bank &&
            src_way[s] == dst_way)
          self_rd = 1'b1;
      if (self_rd) begin
        dst_void     = 1'b0;
        stall_hazard = 1'b1;
      end
      if (!dst_match)
        for (int y = WAYS - 1; y >= 0; y--) begin
          if (!tab[chk_dst_bank][y].v) begin
            free_found = 1'b1;
            dst_way    = YW'(y);
          end
          if (tab[chk_dst_bank][y].v && tab[chk_dst_bank][y].r &&
              tab[chk_dst_bank][y].f == '0) begin
            rdy_found = 1'b1;
            ovf_way   = YW'(y);
          end
        end
    end
    stall_hazard = stall_hazard || raw_haz;
    stall_full = chk_dst_valid && !dst_match && !free_found;
    ovf_req    = !stall_hazard && stall_full && rdy_found;
    if (self_rd && !raw_haz) begin
      ovf_req = 1'b1;
      ovf_way = dst_way;
    end
    ovf_bank   = chk_dst_bank;
    can_issue  = !stall_hazard && !stall_full;
  end

  // ---------------- updates ----------------
  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++)
      for (int y = 0; y < WAYS; y++) begin
        eu  = tab[b][y];
        inc = 0;
        if (issue_fire && can_issue)
          for (int s = 0; s < MAX_SRC; s++)
            if (src_hit[s] && int'(chk_src_bank[s]) == b && int'(src_way[s]) == y)
              inc++;
        if (rd_done[b] && int'(rd_done_way[b]) == y) eu.f = eu.f - 1'b1;
        eu.f = eu.f + $bits(eu.f)'(inc);
        if (wr_data && int'(wr_data_bank) == b && int'(wr_data_way) == y) eu.r = 1'b1;
        if (wb_done[b] && int'(wb_done_way[b]) == y) eu.v = 1'b0;
        if (issue_fire && can_issue && chk_dst_valid &&
            int'(chk_dst_bank) == b && int'(dst_way) == y) begin
          eu.v     = 1'b1;
          eu.r     = 1'b0;
          eu.warp  = chk_warp;
          eu.regid = chk_dst_reg;
        end
        tab_n[b][y] = eu;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++)
        for (int y = 0; y < WAYS; y++) tab[b][y] <= '0;
    end else begin
      tab <= tab_n;
    end
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_chk
    a_rd_done_inflight: assert property (@(posedge clk) disable iff (!rst_n)
      rd_done[b] |-> tab[b][rd_done_way[b]].f != '0)
      else $error("wbit: rd_done on entry with F=0 (bank %0d)", b);
  end
endmodule
