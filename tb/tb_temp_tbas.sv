// Self-checking test of temp_tbas at the evaluated size (48 warps, 8 SMs,
// 2 channels x 16 banks, 32-bit addresses).
//
// A grid of 64 thread blocks with a thread-batch stride of 4 is launched on
// SM 2, which must receive blocks 16..23 (batches 4 and 5) in order.  Each
// block occupies 6 warp slots; warps run a random number of instructions and
// stall at random.  Checks every cycle:
//   * an issued warp belongs to the running batch and is ready and active;
//   * when the running batch has no active warp and another batch does, the
//     scheduler switches to the oldest such batch (lowest batch number);
//   * pages allocated for SM 2 decode back to SM 2's colours (local), CPU
//     pages take the top rows, and addresses built from them decode to the
//     right channel, bank and row.
// Batch switches, local and remote accesses must all occur.
module tb_temp_tbas;
  localparam int NW = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic launch = 0, tb_pop = 0, tb_empty, alloc_cpu = 0;
  logic [15:0] cfg_n_tb = 64, cfg_stride = 4, tb_next, tb_next_batch, tb_left, cur_batch;
  logic [2:0] cfg_sm_id = 2, mem_owner;
  logic [NW-1:0] slot_valid = 0, ready = 0, stall = 0;
  logic [15:0] batch_id [NW];
  logic issue_valid, cur_valid, ev_switch, mem_channel, mem_local;
  logic [5:0] issue_warp;
  logic [31:0] mem_addr = 0;
  logic [3:0] mem_bank;
  logic [14:0] mem_row;
  logic [11:0] mem_column;
  logic [19:0] alloc_seq = 0, alloc_frame;

  temp_tbas dut (.*);

  int left [NW];
  int next_tb = 16, tbs_done = 0, n_switch = 0, n_local = 0, n_remote = 0, n_issue = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (batch_id[w]) batch_id[w] = 0;
    foreach (left[w]) left[w] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    launch = 1;
    @(negedge clk);
    launch = 0;
    chk(int'(tb_left) == 8, "SM 2 gets 8 blocks");
    for (int cyc = 0; cyc < 50000 && tbs_done < 8; cyc++) begin
      int oldest;
      bit cur_act, sw;
      tb_pop = 0;
      for (int b = 0; b < 8; b++)
        if (!tb_pop && b < 6 && slot_valid[b*6 +: 6] == 0 && !tb_empty) begin
          chk(int'(tb_next) == next_tb && int'(tb_next_batch) == next_tb / 4, "block order / batch");
          next_tb++;
          tb_pop = 1;
          for (int k = 0; k < 6; k++) begin
            slot_valid[b*6+k] = 1; batch_id[b*6+k] = tb_next_batch;
            left[b*6+k] = $urandom_range(5, 60);
          end
        end
      for (int w = 0; w < NW; w++)
        if ($urandom_range(0, 9) == 0) stall[w] = !stall[w];
      ready = {$urandom, $urandom};
      // memory traffic: a page of SM 2, or of another SM, or a CPU page
      alloc_cpu = ($urandom_range(0, 3) == 0);
      alloc_seq = 20'($urandom_range(0, 4095));
      #1;
      mem_addr = {alloc_frame, 12'($urandom)};
      if ($urandom_range(0, 3) == 0) mem_addr = $urandom;
      #1;
      chk(int'(mem_channel) == int'(mem_addr[12]) && mem_bank == mem_addr[16:13] &&
          mem_row == mem_addr[31:17] && mem_column == mem_addr[11:0], "address decode");
      chk(mem_local == (mem_owner == 3'd2), "local flag");
      if (mem_addr[31:12] == alloc_frame) begin
        if (!alloc_cpu) chk(mem_local && int'(mem_row) == int'(alloc_seq) / 4, "GPU page local");
        else            chk(int'(mem_row) == 32767 - int'(alloc_seq) / 32, "CPU page top rows");
      end
      if (mem_local) n_local++; else n_remote++;
      // scheduling checks
      oldest = -1; cur_act = 0;
      for (int w = 0; w < NW; w++)
        if (slot_valid[w] && !stall[w]) begin
          if (cur_valid && batch_id[w] == cur_batch) cur_act = 1;
          else if (oldest < 0 || int'(batch_id[w]) < oldest) oldest = int'(batch_id[w]);
        end
      chk(ev_switch == (!cur_act && oldest >= 0), "switch when batch runs dry");
      sw = ev_switch;
      if (issue_valid) begin
        int w;
        w = int'(issue_warp);
        n_issue++;
        chk(slot_valid[w] && ready[w] && !stall[w] && cur_valid && batch_id[w] == cur_batch,
            "issue outside the running batch");
      end
      @(negedge clk);
      if (sw) begin
        n_switch++;
        chk(int'(cur_batch) == oldest, "oldest batch promoted");
      end
      if (issue_valid) begin
        int w;
        w = int'(issue_warp);
        left[w]--;
        if (left[w] == 0) begin
          slot_valid[w] = 0;
          if (slot_valid[(w/6)*6 +: 6] == 0) tbs_done++;
        end
      end
    end
    chk(tbs_done == 8 && tb_empty, "all blocks of the SM ran");
    $display("issue=%0d switch=%0d local=%0d remote=%0d", n_issue, n_switch, n_local, n_remote);
    checks += 3;
    if (n_switch < 2) failures++;
    if (n_local == 0) failures++;
    if (n_remote == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
