// Thread-batch-aware scheduler (TBAS).
//
// With thread-batch memory partitioning, the warps of one thread batch
// (consecutive thread blocks sharing pages) touch the same DRAM pages and
// mostly the same DRAM row of their SM's banks.  TBAS therefore runs one
// thread batch at a time:
//   * the running set is the active warps (resident and not suspended on a
//     long-latency operation) of the current batch; they issue in
//     greedy-then-oldest order;
//   * when the current batch has fewer than MIN_ACTIVE active warps, the
//     whole batch is demoted and the OLDEST pending batch (lowest batch ID,
//     i.e. dispatched first) that has at least MIN_ACTIVE active warps is
//     promoted.  Favouring old batches keeps the row that the older warps
//     will touch again open and avoids bursts of new rows.
// Up to 8 batches are resident (one per thread block slot), so the promotion
// arbiter is small.
//
// Timing: the issue choice is combinational; a batch switch takes effect at
// the next clock edge, during which nothing issues from the demoted batch.
// MIN_ACTIVE = 1 and GTO age by slot number are this design's choices; the
// document gives the promotion order, not the threshold.
module tbas_sched #(
  parameter int unsigned NUM_WARPS  = 48,
  parameter int unsigned BATCH_W    = 16,
  parameter int unsigned MIN_ACTIVE = 1,
  localparam int unsigned WW        = $clog2(NUM_WARPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_WARPS-1:0] slot_valid,
  input  logic [BATCH_W-1:0]   batch_id [NUM_WARPS],
  input  logic [NUM_WARPS-1:0] ready,
  input  logic [NUM_WARPS-1:0] stall,
  output logic                 issue_valid,
  output logic [WW-1:0]        issue_warp,
  output logic                 cur_valid,
  output logic [BATCH_W-1:0]   cur_batch,
  output logic                 ev_switch
);
  logic [NUM_WARPS-1:0] act, in_cur;
  logic                 cur_ok, nxt_found;
  logic [BATCH_W-1:0]   nxt_batch;
  logic [WW-1:0]        last_warp;
  logic                 last_valid;

  assign act = slot_valid & ~stall;

  always_comb begin
    logic [31:0] n;
    n = 0;
    for (int w = 0; w < NUM_WARPS; w++) begin
      in_cur[w] = cur_valid && slot_valid[w] && batch_id[w] == cur_batch;
      if (in_cur[w] && act[w]) n++;
    end
    cur_ok = cur_valid && (n >= MIN_ACTIVE);
  end

  // Oldest pending batch with enough active warps.
  always_comb begin
    nxt_found = 1'b0;
    nxt_batch = '1;
    for (int w = 0; w < NUM_WARPS; w++) begin
      logic [31:0] n;
      n = 0;
      for (int v = 0; v < NUM_WARPS; v++)
        if (act[v] && batch_id[v] == batch_id[w]) n++;
      if (act[w] && !in_cur[w] && n >= MIN_ACTIVE &&
          (!nxt_found || batch_id[w] < nxt_batch)) begin
        nxt_found = 1'b1;
        nxt_batch = batch_id[w];
      end
    end
  end

  assign ev_switch = !cur_ok && nxt_found;

  always_comb begin
    issue_valid = 1'b0;
    issue_warp  = '0;
    if (cur_ok) begin
      if (last_valid && in_cur[last_warp] && act[last_warp] && ready[last_warp]) begin
        issue_valid = 1'b1;
        issue_warp  = last_warp;
      end else begin
        for (int w = NUM_WARPS - 1; w >= 0; w--)
          if (in_cur[w] && act[w] && ready[w]) begin
            issue_valid = 1'b1;
            issue_warp  = WW'(w);
          end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid  <= 1'b0;
      cur_batch  <= '0;
      last_warp  <= '0;
      last_valid <= 1'b0;
    end else begin
      if (ev_switch) begin
        cur_valid <= 1'b1;
        cur_batch <= nxt_batch;
      end
      if (issue_valid) begin
        last_warp  <= issue_warp;
        last_valid <= 1'b1;
      end
    end
  end
endmodule
