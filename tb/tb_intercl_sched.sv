// Self-checking random test of intercl_sched at 48 warps with a 16-warp
// first level.  A reference model of the two-level policy is run alongside:
// demotion of stalled, finished or throttled first-level warps, one
// promotion per cycle while there is room (same CTA, then the precursor CTA,
// then the successor CTA, lowest slot first; the oldest CTA when the first
// level is empty) and greedy-then-oldest issue from the first level.  The
// first level must never exceed 16 warps, only first-level warps may issue,
// and every promotion class, demotion and a full first level must occur.
module tb_intercl_sched;
  localparam int NW = 48, L1 = 16, CW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [NW-1:0] slot_valid = 0, allowed = 0, ready = 0, stall = 0, level1;
  logic [CW-1:0] cta_id [NW];
  logic issue_valid, ev_promote, ev_demote;
  logic [5:0] issue_warp;
  logic [1:0] ev_promote_class;
  // model
  bit m_l1 [NW];
  bit m_last_valid = 0;
  int m_last = 0;
  int n_class [4];
  int n_demote = 0, n_full = 0;

  intercl_sched #(.NUM_WARPS(NW), .L1_SIZE(L1), .CTA_W(CW)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cta_id[w]) cta_id[w] = 0;
    foreach (m_l1[w]) m_l1[w] = 0;
    foreach (n_class[c]) n_class[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 40000; cyc++) begin
      bit kept [NW];
      bit have, found, dem, iv;
      int n, cmin, cmax, pw, pc, best, iw, cnt_l1;
      // 6 CTA slots of 8 warps; a finished CTA is replaced by the next one
      if (cyc % 40 == 0)
        for (int b = 0; b < 6; b++)
          if (!slot_valid[b*8] || $urandom_range(0, 5) == 0) begin
            int id;
            id = cyc / 20 + b + $urandom_range(0, 2);
            for (int k = 0; k < 8; k++) begin
              slot_valid[b*8+k] = 1;
              cta_id[b*8+k] = CW'(id);
            end
          end
      for (int w = 0; w < NW; w++) begin
        if ($urandom_range(0, 299) == 0) slot_valid[w] = 0;
        if ($urandom_range(0, 15) == 0) stall[w] = !stall[w];
        allowed[w] = (cyc % 3000 < 1500) ? 1'b1 : (w % 4 != 0);
      end
      ready = {$urandom, $urandom};
      #1;
      // reference
      dem = 0; n = 0; have = 0; cmin = 65535; cmax = 0;
      for (int w = 0; w < NW; w++) begin
        if (m_l1[w] && (stall[w] || !slot_valid[w] || !allowed[w])) dem = 1;
        kept[w] = m_l1[w] && !(stall[w] || !slot_valid[w] || !allowed[w]);
        if (kept[w]) begin
          n++; have = 1;
          if (int'(cta_id[w]) < cmin) cmin = int'(cta_id[w]);
          if (int'(cta_id[w]) > cmax) cmax = int'(cta_id[w]);
        end
      end
      found = 0; pw = 0; pc = 0; best = 0;
      if (!have) begin
        for (int w = 0; w < NW; w++)
          if (slot_valid[w] && allowed[w] && !stall[w] && !m_l1[w] &&
              (!found || int'(cta_id[w]) < best)) begin
            found = 1; pw = w; best = int'(cta_id[w]);
          end
      end else begin
        for (int c = 1; c <= 3; c++)
          for (int w = 0; w < NW; w++)
            if (!found && slot_valid[w] && allowed[w] && !stall[w] && !m_l1[w] &&
                ((c == 1 && int'(cta_id[w]) >= cmin && int'(cta_id[w]) <= cmax) ||
                 (c == 2 && int'(cta_id[w]) == cmin - 1) ||
                 (c == 3 && int'(cta_id[w]) == cmax + 1))) begin
              found = 1; pw = w; pc = c;
            end
      end
      iv = 0; iw = 0;
      if (m_last_valid && kept[m_last] && ready[m_last]) begin iv = 1; iw = m_last; end
      else
        for (int w = NW - 1; w >= 0; w--)
          if (kept[w] && ready[w]) begin iv = 1; iw = w; end
      cnt_l1 = 0;
      for (int w = 0; w < NW; w++) begin
        chk(level1[w] == m_l1[w], "level1");
        if (level1[w]) cnt_l1++;
      end
      chk(cnt_l1 <= L1, "first level over size");
      if (cnt_l1 == L1) n_full++;
      chk(ev_demote == dem, "demote");
      chk(ev_promote == (n < L1 && found), "promote");
      if (ev_promote) chk(int'(ev_promote_class) == pc, "promote class");
      chk(issue_valid == iv && (!iv || int'(issue_warp) == iw), "issue");
      if (issue_valid) chk(level1[issue_warp], "issue outside first level");
      // update
      if (dem) n_demote++;
      if (n < L1 && found) n_class[pc]++;
      for (int w = 0; w < NW; w++) m_l1[w] = kept[w];
      if (n < L1 && found) m_l1[pw] = 1;
      if (iv) begin m_last_valid = 1; m_last = iw; end
      @(negedge clk);
    end
    $display("promote same=%0d precursor=%0d successor=%0d empty=%0d demote=%0d full=%0d",
             n_class[1], n_class[2], n_class[3], n_class[0], n_demote, n_full);
    checks += 6;
    for (int c = 0; c < 4; c++) if (n_class[c] == 0) failures++;
    if (n_demote == 0) failures++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
