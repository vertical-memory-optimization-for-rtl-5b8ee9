// Self-checking test of the versatile warp scheduler (vws) at full size
// (48 warps, 16-warp first level, 256-block L1, 8192-entry AMT, 15 SMs).
//
// A kernel of 150 CTAs of 256 threads (8 warps each) is launched on SM 3.
// The testbench keeps six CTAs resident, taking new ones from the dispatch
// queue, and runs warps that touch a small private set of cache blocks
// (20 blocks, 80 accesses per warp), so that after the sampling stage the
// estimate becomes WS = 20, RRDegr = 4 and N_act = ceil(4*256/80) = 13.
// Checks every cycle:
//   * the AMT reports a first miss exactly when a reference table says so;
//   * `active` is the first n_act resident slots, n_act = 48 while sampling;
//   * issue only from first-level, active, ready, unstalled warps; the first
//     level never exceeds 16 warps;
//   * the CTAs handed out are SM 3's consecutive run (30..39).
// At the end: N_pred = 8, N_act = 13, WS = 20, RRDegr = 4, and promotions,
// demotions, AMT clears and throttling must all have occurred.
module tb_vws;
  localparam int NW = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic launch = 0, cta_pop = 0, cta_empty;
  logic [15:0] cfg_n_cta = 150, cta_next, n_pred, cta_left;
  logic [10:0] cfg_cta_size = 256;
  logic [7:0] cfg_sm_id = 3;
  logic acc_valid = 0, miss_valid = 0, done_valid = 0;
  logic [5:0] acc_warp = 0, miss_warp = 0, done_warp = 0, issue_warp;
  logic [24:0] miss_blk = 0;
  logic [NW-1:0] slot_valid = 0, ready = 0, stall = 0, active, level1;
  logic [15:0] cta_id [NW];
  logic issue_valid, sampling, ev_first_miss, ev_amt_clear, ev_promote, ev_demote;
  logic [6:0] n_act;
  logic [13:0] ws, rrd;
  logic [1:0] ev_promote_class;

  vws dut (.*);

  bit amt_ref [8192];
  int progress [NW];       // accesses done by the warp in this slot
  int next_cta_exp = 30;
  int n_promote = 0, n_demote = 0, n_clear = 0, n_throttled = 0, n_issue = 0;
  int ctas_done = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cta_id[w]) cta_id[w] = 0;
    foreach (progress[w]) progress[w] = 0;
    foreach (amt_ref[i]) amt_ref[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    launch = 1;
    @(negedge clk);
    launch = 0;
    foreach (amt_ref[i]) amt_ref[i] = 0;
    chk(int'(n_pred) == 8, "N_pred");
    chk(int'(cta_left) == 10, "SM 3 gets 10 CTAs");
    for (int cyc = 0; cyc < 60000 && ctas_done < 10; cyc++) begin
      int fin;
      cta_pop = 0; done_valid = 0; acc_valid = 0; miss_valid = 0;
      // refill one empty CTA slot per cycle
      for (int b = 0; b < 6; b++)
        if (!cta_pop && slot_valid[b*8 +: 8] == 0 && !cta_empty) begin
          chk(int'(cta_next) == next_cta_exp, "CTA order");
          next_cta_exp++;
          cta_pop = 1;
          for (int k = 0; k < 8; k++) begin
            slot_valid[b*8+k] = 1; cta_id[b*8+k] = cta_next; progress[b*8+k] = 0;
          end
        end
      // finished warp
      fin = -1;
      for (int w = 0; w < NW; w++) if (fin < 0 && slot_valid[w] && progress[w] >= 80) fin = w;
      if (fin >= 0) begin
        done_valid = 1; done_warp = 6'(fin);
      end
      for (int w = 0; w < NW; w++)
        if ($urandom_range(0, 19) == 0) stall[w] = !stall[w];
      ready = {$urandom, $urandom};
      #1;
      // the issued warp makes one L1 access
      if (issue_valid) begin
        int w;
        w = int'(issue_warp);
        n_issue++;
        chk(level1[w] && active[w] && ready[w] && !stall[w] && slot_valid[w], "issue rule");
        if (w != fin) begin
          acc_valid = 1; acc_warp = 6'(w);
          // first 20 accesses miss on the warp's own blocks, then hits
          if (progress[w] < 20) begin
            miss_valid = 1; miss_warp = 6'(w);
            miss_blk = 25'((int'(cta_id[w]) * 8 + w % 8) * 32 + progress[w]);
          end
          progress[w]++;
        end
      end
      #1;
      if (miss_valid) begin
        chk(ev_first_miss == !amt_ref[miss_blk % 8192], "AMT first miss");
        amt_ref[miss_blk % 8192] = 1;
      end
      begin
        int seen, n1;
        seen = 0; n1 = 0;
        for (int w = 0; w < NW; w++) begin
          chk(active[w] == (slot_valid[w] && seen < int'(n_act)), "active prefix");
          if (slot_valid[w]) seen++;
          if (level1[w]) n1++;
        end
        chk(n1 <= 16, "first level size");
      end
      chk(!sampling || int'(n_act) == NW, "no throttling while sampling");
      if (int'(n_act) < NW) n_throttled++;
      if (ev_promote) n_promote++;
      if (ev_demote) n_demote++;
      if (ev_amt_clear) begin n_clear++; foreach (amt_ref[i]) amt_ref[i] = 0; end
      @(negedge clk);
      if (fin >= 0) begin
        slot_valid[fin] = 0;
        // a CTA is done when its 8 slots are empty
        if (slot_valid[(fin/8)*8 +: 8] == 0) ctas_done++;
      end
    end
    chk(ctas_done == 10 && cta_empty, "all CTAs of the SM ran");
    chk(int'(ws) == 20 * 16, "WS = 20");
    chk(int'(rrd) == 4 * 16, "RRDegr = 4");
    chk(int'(n_act) == 13, "N_act = 13");
    $display("issue=%0d promote=%0d demote=%0d amt_clear=%0d throttled=%0d ws=%0d rrd=%0d n_act=%0d",
             n_issue, n_promote, n_demote, n_clear, n_throttled, ws, rrd, n_act);
    checks += 4;
    if (n_promote == 0) failures++;
    if (n_demote == 0) failures++;
    if (n_clear == 0) failures++;
    if (n_throttled == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
