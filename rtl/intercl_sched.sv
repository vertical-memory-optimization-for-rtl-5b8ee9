// Inter-CTA locality (InterCL) two-level warp scheduler.
//
// The first level holds at most L1_SIZE warps and is the only set that
// issues, in greedy-then-oldest order (keep issuing the last warp while it is
// ready, otherwise the lowest-numbered ready slot).  All other warps wait in
// the second level.  A first-level warp that suspends on a pipeline stall
// (`stall`), finishes, or is throttled (not in `allowed`) is demoted.  While
// the first level has room, one warp per cycle is promoted, choosing by the
// CTA it belongs to, highest priority first:
//   1. a CTA already represented in the first level,
//   2. the CTA just before the lowest CTA in the first level (precursor),
//   3. the CTA just after the highest CTA in the first level (successor).
// Within a class the lowest slot wins.  When the first level is empty the
// oldest CTA (lowest ID) is taken.  The first level therefore always spans
// consecutive CTAs, which share cache blocks.
//
// "Represented in the first level" is tested as lying between the lowest and
// highest first-level CTA IDs, which is exact because those CTAs are kept
// consecutive; this, the one-promotion-per-cycle rate and the GTO age by slot
// number are this design's choices.  `issue_*` is combinational; level
// changes take effect at the clock edge.
module intercl_sched #(
  parameter int unsigned NUM_WARPS = 48,
  parameter int unsigned L1_SIZE   = 16,
  parameter int unsigned CTA_W     = 16,
  localparam int unsigned WW       = $clog2(NUM_WARPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_WARPS-1:0] slot_valid,
  input  logic [NUM_WARPS-1:0] allowed,     // from IWL/IntraCL throttling
  input  logic [CTA_W-1:0]     cta_id [NUM_WARPS],
  input  logic [NUM_WARPS-1:0] ready,       // has an issuable instruction
  input  logic [NUM_WARPS-1:0] stall,       // suspended on a long stall
  output logic                 issue_valid,
  output logic [WW-1:0]        issue_warp,
  output logic [NUM_WARPS-1:0] level1,
  output logic                 ev_promote,
  output logic [1:0]           ev_promote_class, // 1,2,3 as above, 0: empty L1
  output logic                 ev_demote
);
  logic [NUM_WARPS-1:0] demote, kept;
  logic [WW-1:0]        last_warp;
  logic                 last_valid;
  logic                 have_l1, room;
  logic [CTA_W-1:0]     cmin, cmax;
  logic                 pr_found;
  logic [WW-1:0]        pr_warp;
  logic [1:0]           pr_class;
  logic [NUM_WARPS-1:0] nl;

  assign demote    = level1 & (stall | ~slot_valid | ~allowed);
  assign kept      = level1 & ~demote;
  assign ev_demote = (demote != '0);

  always_comb begin
    logic [31:0] n;
    n       = 0;
    have_l1 = 1'b0;
    cmin    = '1;
    cmax    = '0;
    for (int w = 0; w < NUM_WARPS; w++)
      if (kept[w]) begin
        n++;
        have_l1 = 1'b1;
        if (cta_id[w] < cmin) cmin = cta_id[w];
        if (cta_id[w] > cmax) cmax = cta_id[w];
      end
    room = (n < L1_SIZE);
  end

  // Promotion choice.
  always_comb begin
    logic [NUM_WARPS-1:0] cand;
    logic [CTA_W-1:0]     best_cta;
    cand     = slot_valid & allowed & ~stall & ~level1;
    pr_found = 1'b0;
    pr_warp  = '0;
    pr_class = 2'd0;
    best_cta = '1;
    if (!have_l1) begin
      for (int w = 0; w < NUM_WARPS; w++)
        if (cand[w] && (!pr_found || cta_id[w] < best_cta)) begin
          pr_found = 1'b1;
          pr_warp  = WW'(w);
          best_cta = cta_id[w];
        end
    end else begin
      for (int c = 1; c <= 3; c++)
        for (int w = 0; w < NUM_WARPS; w++)
          if (!pr_found && cand[w] &&
              ((c == 1 && cta_id[w] >= cmin && cta_id[w] <= cmax) ||
               (c == 2 && cmin != '0 && cta_id[w] == cmin - 1'b1) ||
               (c == 3 && cmax != '1 && cta_id[w] == cmax + 1'b1))) begin
            pr_found = 1'b1;
            pr_warp  = WW'(w);
            pr_class = 2'(c);
          end
    end
  end

  assign ev_promote       = room && pr_found;
  assign ev_promote_class = pr_class;

  always_comb begin
    nl = kept;
    if (room && pr_found) nl[pr_warp] = 1'b1;
  end

  // Greedy-then-oldest issue among first-level warps.
  always_comb begin
    issue_valid = 1'b0;
    issue_warp  = '0;
    if (last_valid && kept[last_warp] && ready[last_warp]) begin
      issue_valid = 1'b1;
      issue_warp  = last_warp;
    end else begin
      for (int w = NUM_WARPS - 1; w >= 0; w--)
        if (kept[w] && ready[w]) begin
          issue_valid = 1'b1;
          issue_warp  = WW'(w);
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level1     <= '0;
      last_warp  <= '0;
      last_valid <= 1'b0;
    end else begin
      level1 <= nl;
      if (issue_valid) begin
        last_warp  <= issue_warp;
        last_valid <= 1'b1;
      end
    end
  end
endmodule
