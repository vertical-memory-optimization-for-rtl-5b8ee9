// Self-checking random test of tbas_sched at 48 warps against a reference
// model of the policy: one thread batch runs at a time; when it has no
// active (resident, unstalled) warp left it is replaced by the oldest
// (lowest-numbered) batch that has one; within the batch warps issue
// greedy-then-oldest.  Also checks directly that an issued warp is always
// ready, active and of the running batch, and that batch switches, issue
// from the same warp and issue after a switch all occur.
//
// Timing: a 10-time-unit clock; stimulus changes just after a rising edge,
// combinational outputs are checked before the next edge and registered
// state after it.  A watchdog ends the run with a failure if it hangs.
module tb_tbas_sched;
  localparam int NW = 48, BW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [NW-1:0] slot_valid = 0, ready = 0, stall = 0;
  logic [BW-1:0] batch_id [NW];
  logic issue_valid, cur_valid, ev_switch;
  logic [5:0] issue_warp;
  logic [BW-1:0] cur_batch;
  // model
  bit m_cur_valid = 0, m_last_valid = 0;
  int m_cur = 0, m_last = 0;
  int n_switch = 0, n_greedy = 0, n_issue = 0;

  tbas_sched #(.NUM_WARPS(NW), .BATCH_W(BW), .MIN_ACTIVE(1)) dut (.*);

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
    foreach (batch_id[w]) batch_id[w] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 30000; cyc++) begin
      bit cur_ok, found, ev, iv;
      int nb, iw, n;
      // thread blocks of 8 warps (6 slots); batches of 2 blocks finish and
      // are replaced now and then
      if (cyc % 50 == 0)
        for (int b = 0; b < 6; b++)
          if (!slot_valid[b*8] || $urandom_range(0, 3) == 0) begin
            int bid;
            bid = cyc / 25 + b / 2 + $urandom_range(0, 3);
            for (int k = 0; k < 8; k++) begin
              slot_valid[b*8+k] = $urandom_range(0, 7) != 0;
              batch_id[b*8+k] = BW'(bid);
            end
          end
      ready = {$urandom, $urandom};
      for (int w = 0; w < NW; w++)
        if ($urandom_range(0, 9) == 0) stall[w] = !stall[w];
      if (cyc % 997 < 20) stall = '1;   // nobody active for a while
      #1;
      // reference
      n = 0;
      for (int w = 0; w < NW; w++)
        if (m_cur_valid && slot_valid[w] && !stall[w] && int'(batch_id[w]) == m_cur) n++;
      cur_ok = m_cur_valid && n >= 1;
      found = 0; nb = 0;
      for (int w = 0; w < NW; w++)
        if (slot_valid[w] && !stall[w] && !(m_cur_valid && int'(batch_id[w]) == m_cur) &&
            (!found || int'(batch_id[w]) < nb)) begin
          found = 1; nb = int'(batch_id[w]);
        end
      ev = !cur_ok && found;
      iv = 0; iw = 0;
      if (cur_ok) begin
        if (m_last_valid && slot_valid[m_last] && !stall[m_last] && ready[m_last] &&
            int'(batch_id[m_last]) == m_cur) begin
          iv = 1; iw = m_last; n_greedy++;
        end else
          for (int w = NW - 1; w >= 0; w--)
            if (slot_valid[w] && !stall[w] && ready[w] && int'(batch_id[w]) == m_cur) begin
              iv = 1; iw = w;
            end
      end
      chk(ev_switch == ev, "switch");
      chk(issue_valid == iv, "issue valid");
      if (iv) chk(int'(issue_warp) == iw, "issue warp");
      if (issue_valid)
        chk(slot_valid[issue_warp] && !stall[issue_warp] && ready[issue_warp] &&
            batch_id[issue_warp] == cur_batch, "issued warp not eligible");
      chk(cur_valid == m_cur_valid && (!m_cur_valid || int'(cur_batch) == m_cur), "state");
      if (ev) begin m_cur_valid = 1; m_cur = nb; n_switch++; end
      if (iv) begin m_last_valid = 1; m_last = iw; n_issue++; end
      @(negedge clk);
    end
    $display("switch=%0d issue=%0d greedy=%0d", n_switch, n_issue, n_greedy);
    checks += 3;
    if (n_switch == 0) failures++;
    if (n_issue == 0) failures++;
    if (n_greedy == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
