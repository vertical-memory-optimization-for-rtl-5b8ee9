// Register-file bank arbitrator with write buffer data array (WBDA).
//
// One per bank.  Reads issued by the scheduler enter a first-come-first-serve
// queue (up to MAX_SRC per cycle, QDEPTH deep), so the order in which the
// bank's tracks move is exactly the order the scheduler planned with.  A read
// whose value sits in the write buffer is answered from the WBDA in one
// cycle without touching the tracks; the others go to the racetrack bank.
//
// Writes from the writeback stage never go to the tracks directly: they land
// in the WBDA way the scoreboard assigned at issue.  A way leaves the buffer
// in one of two ways:
//  * piggyback write: while the bank is idle, a way that is ready (data
//    received, no reads pending, as reported by the WBIT) and whose register is
//    right under its access port (its BML equals the bank location) is written
//    with no shift;
//  * overflow writeback: when the WBIT finds the set full it names a ready
//    way, which is written regardless of the shift it costs.
// Priority when the bank is idle: WBDA read at the queue head, overflow
// writeback, piggyback write, RF read at the queue head.  A way is not written
// back while an older queued RF read targets the same register, nor in a
// cycle in which a new read of that way or register arrives (the scoreboard
// counts that read against the way at the same clock edge).  `wb_done`
// is reported when the write is handed to the bank; the bank then holds the
// data and serves later requests in order.
//
// Timing: a WBDA read answers one cycle after it reaches the head; RF reads
// answer after shift + read latency of rm_bank.  The priority order, the
// queue depth and the reporting point of `wb_done` are this design's choices.
// Lint note: `rst_n` also disables the queue-overflow assertion
// (`disable iff`), which Verilator reports as a reset used both
// asynchronously and synchronously; the assertion is not part of the circuit.
module rf_arbiter #(
  parameter int unsigned ENTRIES = gpu_pkg::ENTRIES,
  parameter int unsigned PORTS   = gpu_pkg::PORTS,
  parameter int unsigned DATA_W  = gpu_pkg::DATA_W,
  parameter int unsigned WAYS    = gpu_pkg::WB_WAYS,
  parameter int unsigned MAX_SRC = gpu_pkg::MAX_SRC,
  parameter int unsigned QDEPTH  = 8,
  parameter int unsigned TAG_W   = 8,
  localparam int unsigned SEG    = ENTRIES / PORTS,
  localparam int unsigned BW     = $clog2(SEG),
  localparam int unsigned PW     = (PORTS > 1) ? $clog2(PORTS) : 1,
  localparam int unsigned YW     = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned QW     = $clog2(QDEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // read requests from issue (slot order = queue order)
  input  logic              rd_valid   [MAX_SRC],
  input  logic              rd_from_wb [MAX_SRC],
  input  logic [YW-1:0]     rd_way     [MAX_SRC],
  input  logic [PW-1:0]     rd_port    [MAX_SRC],
  input  logic [BW-1:0]     rd_bml     [MAX_SRC],
  input  logic [TAG_W-1:0]  rd_tag     [MAX_SRC],
  output logic [QW-1:0]     q_free,
  // write-buffer way allocated at issue: where its register lives
  input  logic              alloc_valid,
  input  logic [YW-1:0]     alloc_way,
  input  logic [PW-1:0]     alloc_port,
  input  logic [BW-1:0]     alloc_bml,
  // result data from the writeback stage
  input  logic              wdata_valid,
  input  logic [YW-1:0]     wdata_way,
  input  logic [DATA_W-1:0] wdata,
  // write-buffer state from the WBIT
  input  logic [WAYS-1:0]   way_ready,
  input  logic              ovf_req,
  input  logic [YW-1:0]     ovf_way,
  // operand responses to the collector units
  output logic              rsp_valid,
  output logic [TAG_W-1:0]  rsp_tag,
  output logic [DATA_W-1:0] rsp_data,
  // notifications to the WBIT
  output logic              rd_done,
  output logic [YW-1:0]     rd_done_way,
  output logic              wb_done,
  output logic [YW-1:0]     wb_done_way,
  // event pulses for statistics
  output logic              ev_wb_read,
  output logic              ev_piggyback,
  output logic              ev_overflow,
  output logic              ev_rf_read,
  output logic              ev_shift,
  output logic              ev_shift_dir
);
  typedef struct packed {
    logic             from_wb;
    logic [YW-1:0]    way;
    logic [PW-1:0]    port;
    logic [BW-1:0]    bml;
    logic [TAG_W-1:0] tag;
  } rd_req_t;

  rd_req_t           q [QDEPTH];
  logic [QW-1:0]     q_cnt;
  logic [DATA_W-1:0] wbda      [WAYS];
  logic [PW-1:0]     way_port  [WAYS];
  logic [BW-1:0]     way_bml   [WAYS];

  // bank interface
  logic              bk_req_valid, bk_req_ready, bk_req_we;
  logic [PW-1:0]     bk_port;
  logic [BW-1:0]     bk_bml;
  logic [DATA_W-1:0] bk_wdata;
  logic              bk_rsp_valid, bk_rsp_we;
  logic [DATA_W-1:0] bk_rdata;
  logic [BW-1:0]     bk_loc;
  logic [TAG_W-1:0]  rf_tag_q;

  rm_bank #(.ENTRIES(ENTRIES), .PORTS(PORTS), .DATA_W(DATA_W)) u_bank (
    .clk, .rst_n,
    .req_valid (bk_req_valid),
    .req_ready (bk_req_ready),
    .req_we    (bk_req_we),
    .req_port  (bk_port),
    .req_bml   (bk_bml),
    .req_wdata (bk_wdata),
    .rsp_valid (bk_rsp_valid),
    .rsp_we    (bk_rsp_we),
    .rsp_rdata (bk_rdata),
    .loc       (bk_loc),
    .shift_pulse(ev_shift),
    .shift_dir (ev_shift_dir)
  );

  // ---------------- decision for this cycle ----------------
  typedef enum logic [2:0] {A_NONE, A_WBREAD, A_OVF, A_PIGGY, A_RFREAD} act_t;
  act_t          act;
  logic [YW-1:0] wb_way_sel;
  logic [WAYS-1:0] way_blocked;   // a queued or arriving read wants that way

  always_comb begin
    for (int y = 0; y < WAYS; y++) begin
      way_blocked[y] = 1'b0;
      for (int i = 0; i < QDEPTH; i++)
        if (i < int'(q_cnt) && !q[i].from_wb &&
            q[i].port == way_port[y] && q[i].bml == way_bml[y])
          way_blocked[y] = 1'b1;
      // a read of this way (or of its row) arriving in this very cycle
      for (int s = 0; s < MAX_SRC; s++)
        if (rd_valid[s] && ((rd_from_wb[s] && rd_way[s] == YW'(y)) ||
            (!rd_from_wb[s] && rd_port[s] == way_port[y] && rd_bml[s] == way_bml[y])))
          way_blocked[y] = 1'b1;
    end
  end

  always_comb begin
    act        = A_NONE;
    wb_way_sel = '0;
    if (q_cnt != '0 && q[0].from_wb && !(bk_rsp_valid && !bk_rsp_we)) begin
      act = A_WBREAD;
    end else if (bk_req_ready) begin
      if (ovf_req && way_ready[ovf_way] && !way_blocked[ovf_way]) begin
        act        = A_OVF;
        wb_way_sel = ovf_way;
      end else begin
        for (int y = WAYS - 1; y >= 0; y--)
          if (way_ready[y] && !way_blocked[y] && way_bml[y] == bk_loc) begin
            act        = A_PIGGY;
            wb_way_sel = YW'(y);
          end
        if (act == A_NONE && q_cnt != '0 && !q[0].from_wb) act = A_RFREAD;
      end
    end
  end

  assign bk_req_valid = (act == A_OVF) || (act == A_PIGGY) || (act == A_RFREAD);
  assign bk_req_we    = (act == A_OVF) || (act == A_PIGGY);
  assign bk_port      = bk_req_we ? way_port[wb_way_sel] : q[0].port;
  assign bk_bml       = bk_req_we ? way_bml[wb_way_sel]  : q[0].bml;
  assign bk_wdata     = wbda[wb_way_sel];

  assign wb_done      = bk_req_we;
  assign wb_done_way  = wb_way_sel;
  assign ev_piggyback = (act == A_PIGGY);
  assign ev_overflow  = (act == A_OVF);
  assign ev_wb_read   = (act == A_WBREAD);
  assign ev_rf_read   = (act == A_RFREAD);

  // ---------------- queue ----------------
  logic pop;
  logic [31:0] n_push;
  rd_req_t     nq [QDEPTH];
  logic [31:0] k;
  assign pop = (act == A_WBREAD) || (act == A_RFREAD);

  always_comb begin
    n_push = 0;
    for (int s = 0; s < MAX_SRC; s++) if (rd_valid[s]) n_push++;
  end
  assign q_free = QW'(QDEPTH - int'(q_cnt));

  always_comb begin
    begin
      for (int i = 0; i < QDEPTH; i++) nq[i] = q[i];
      k = int'(q_cnt);
      if (pop) begin
        for (int i = 0; i < QDEPTH - 1; i++) nq[i] = q[i + 1];
        k = k - 1;
      end
      for (int s = 0; s < MAX_SRC; s++)
        if (rd_valid[s] && k < QDEPTH) begin
          nq[k] = '{from_wb: rd_from_wb[s], way: rd_way[s], port: rd_port[s],
                    bml: rd_bml[s], tag: rd_tag[s]};
          k++;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt <= '0;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
    end else begin
      for (int i = 0; i < QDEPTH; i++) q[i] <= nq[i];
      q_cnt <= QW'(k);
    end
  end

  // ---------------- write buffer data array and locations ----------------
  always_ff @(posedge clk) begin
    if (wdata_valid) wbda[wdata_way] <= wdata;
    if (alloc_valid) begin
      way_port[alloc_way] <= alloc_port;
      way_bml[alloc_way]  <= alloc_bml;
    end
  end

  // ---------------- responses ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid   <= 1'b0;
      rsp_tag     <= '0;
      rd_done     <= 1'b0;
      rd_done_way <= '0;
      rf_tag_q    <= '0;
    end else begin
      rsp_valid <= 1'b0;
      rd_done   <= 1'b0;
      if (act == A_RFREAD) rf_tag_q <= q[0].tag;
      if (act == A_WBREAD) begin
        rsp_valid   <= 1'b1;
        rsp_tag     <= q[0].tag;
        rd_done     <= 1'b1;
        rd_done_way <= q[0].way;
      end else if (bk_rsp_valid && !bk_rsp_we) begin
        rsp_valid <= 1'b1;
        rsp_tag   <= rf_tag_q;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (act == A_WBREAD)                  rsp_data <= wbda[q[0].way];
    else if (bk_rsp_valid && !bk_rsp_we)  rsp_data <= bk_rdata;
  end

  a_no_q_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(q_cnt) + n_push - int'(pop) <= QDEPTH)
    else $error("rf_arbiter: read queue overflow");
endmodule
