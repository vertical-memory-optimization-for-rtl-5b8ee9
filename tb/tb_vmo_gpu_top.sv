// End-to-end, full-size test of vmo_gpu_top (no parameter overrides: 48
// warps, 16 banks of 64 x 1024-bit warp registers on 4-port racetracks,
// 2 write-buffer ways per bank; VWS for 15 SMs; TEMP for 8 SMs with
// 2 channels x 16 banks).  Three processes drive the three sections at once.
//
// Register file: all 48 warps run random instruction streams over 20
// registers each (the register remapping spreads the 960 registers over the
// 16 banks, 60 rows each).  The testbench is instruction buffer, collector
// and writeback stage; every operand is compared with a reference register
// file, issue must respect RAW/WAW, and every read must be answered.
// L1 scheduling: a 150-CTA kernel runs on SM 3; issue must come from the
// first level and the active set, and the working-set estimate must settle
// at WS = 20, RRDegr = 4, N_act = 13.
// DRAM: a 64-block grid with stride 4 runs on SM 2 under TBAS while pages
// are allocated and decoded.
//
// Each mechanism is counted and any mechanism that never happens is a
// failure: reads from the write buffer, piggyback writes, overflow
// writebacks, track reads, shifts in both directions, voided writes,
// full-set stalls, hazard stalls; first misses, AMT clears, throttling,
// promotions of every class, demotions; batch switches, local and remote
// accesses, CPU frames.
module tb_vmo_gpu_top;
  localparam int NW = 48, NB = 16, DW = 1024, MS = 3, NREG = 20, USE = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- ports ----------------
  logic [5:0]    rf_cfg_num_reg_warp = NREG;
  logic [3:0]    rf_cfg_offset = 0;
  logic [NW-1:0] rf_ib_valid = 0;
  logic          rf_ib_dst_valid [NW];
  logic [5:0]    rf_ib_dst_reg   [NW];
  logic          rf_ib_src_valid [NW][MS];
  logic [5:0]    rf_ib_src_reg   [NW][MS];
  logic          rf_iss_valid;
  logic [5:0]    rf_iss_warp;
  logic [15:0]   rf_iss_score;
  logic [3:0]    rf_iss_dst_bank;
  logic          rf_iss_dst_way;
  logic          rf_opnd_valid [NB];
  logic [7:0]    rf_opnd_tag   [NB];
  logic [DW-1:0] rf_opnd_data  [NB];
  logic          rf_wb_valid = 0;
  logic [3:0]    rf_wb_bank = 0;
  logic          rf_wb_way = 0;
  logic [DW-1:0] rf_wb_data = 0;
  logic [NB-1:0] rf_ev_wb_read, rf_ev_piggyback, rf_ev_overflow, rf_ev_rf_read;
  logic [NB-1:0] rf_ev_shift, rf_ev_shift_dir;
  logic [3:0]    rf_plan_bml [NB];
  logic [1:0]    rf_wb_occupied [NB];
  logic          rf_ev_void, rf_ev_stall_full, rf_ev_stall_hazard;

  logic          vws_launch = 0, vws_cta_pop = 0, vws_cta_empty;
  logic [15:0]   vws_cfg_n_cta = 150, vws_cta_next, vws_n_pred, vws_cta_left;
  logic [10:0]   vws_cfg_cta_size = 256;
  logic [7:0]    vws_cfg_sm_id = 3;
  logic          vws_acc_valid = 0, vws_miss_valid = 0, vws_done_valid = 0;
  logic [5:0]    vws_acc_warp = 0, vws_miss_warp = 0, vws_done_warp = 0, vws_issue_warp;
  logic [24:0]   vws_miss_blk = 0;
  logic [NW-1:0] vws_slot_valid = 0, vws_ready = 0, vws_stall = 0, vws_active, vws_level1;
  logic [15:0]   vws_cta_id [NW];
  logic          vws_issue_valid, vws_sampling, vws_ev_first_miss, vws_ev_amt_clear;
  logic          vws_ev_promote, vws_ev_demote;
  logic [1:0]    vws_ev_promote_class;
  logic [6:0]    vws_n_act;
  logic [13:0]   vws_ws, vws_rrd;

  logic          temp_launch = 0, temp_tb_pop = 0, temp_tb_empty, temp_alloc_cpu = 0;
  logic [15:0]   temp_cfg_n_tb = 64, temp_cfg_stride = 4, temp_tb_next, temp_tb_next_batch;
  logic [15:0]   temp_tb_left, temp_cur_batch;
  logic [2:0]    temp_cfg_sm_id = 2, temp_mem_owner;
  logic [NW-1:0] temp_slot_valid = 0, temp_ready = 0, temp_stall = 0;
  logic [15:0]   temp_batch_id [NW];
  logic          temp_issue_valid, temp_cur_valid, temp_ev_switch, temp_mem_channel, temp_mem_local;
  logic [5:0]    temp_issue_warp;
  logic [31:0]   temp_mem_addr = 0;
  logic [3:0]    temp_mem_bank;
  logic [14:0]   temp_mem_row;
  logic [11:0]   temp_mem_column;
  logic [19:0]   temp_alloc_seq = 0, temp_alloc_frame;

  vmo_gpu_top dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  // mechanism counters
  int n_wbr = 0, n_pig = 0, n_ovf = 0, n_rfr = 0, n_sh_up = 0, n_sh_dn = 0;
  int n_void = 0, n_full = 0, n_haz = 0, n_rf_issue = 0, n_opnd = 0;
  int n_first = 0, n_clear = 0, n_thr = 0, n_demote = 0, n_vws_issue = 0;
  int n_class [4];
  int n_switch = 0, n_local = 0, n_remote = 0, n_cpu = 0, n_temp_issue = 0;
  bit rf_fin = 0, vws_fin = 0, temp_fin = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ======================= register file =======================
  logic [DW-1:0] ref_rf [NW][NREG];
  bit            known  [NW][NREG];
  bit            pend   [NW][NREG];
  int            waiting [NW];
  bit            exp_known [NW][MS];
  logic [DW-1:0] exp_val   [NW][MS];
  bit            exp_busy  [NW][MS];
  typedef struct { int warp; int rg; int bank; int way; int t; logic [DW-1:0] d; } res_t;
  res_t          pipe [$];
  logic          iss_q = 0;
  logic [5:0]    iss_w_q = 0;

  always @(posedge clk) begin
    iss_q   <= rf_iss_valid;
    iss_w_q <= rf_iss_warp;
  end

  function automatic logic [DW-1:0] rand_word();
    logic [DW-1:0] v;
    for (int i = 0; i < DW / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic new_instr(input int w);
    // registers 0..USE-1 carry most traffic so that buffer hits happen
    rf_ib_dst_valid[w] = $urandom_range(0, 5) != 0;
    rf_ib_dst_reg[w]   = 6'($urandom_range(0, 3) == 0 ? $urandom_range(0, NREG - 1)
                                                        : $urandom_range(0, USE - 1));
    for (int s = 0; s < MS; s++) begin
      rf_ib_src_valid[w][s] = $urandom_range(0, 3) != 0;
      rf_ib_src_reg[w][s]   = 6'($urandom_range(0, 3) == 0 ? $urandom_range(0, NREG - 1)
                                                            : $urandom_range(0, USE - 1));
    end
  endtask

  initial begin : rf_proc
    int cyc;
    for (int w = 0; w < NW; w++) begin
      waiting[w] = 0;
      for (int r = 0; r < NREG; r++) begin known[w][r] = 0; pend[w][r] = 0; end
      for (int s = 0; s < MS; s++) exp_busy[w][s] = 0;
      new_instr(w);
    end
    wait (rst_n);
    @(negedge clk);
    cyc = 0;
    forever begin
      int wbi;
      bit gen;
      cyc++;
      gen = cyc < 6000;
      rf_wb_valid = 0;
      wbi = -1;
      foreach (pipe[i]) if (wbi < 0 && pipe[i].t <= cyc) wbi = i;
      if (wbi >= 0) begin
        res_t r;
        r = pipe[wbi];
        pipe.delete(wbi);
        rf_wb_valid = 1; rf_wb_bank = 4'(r.bank); rf_wb_way = r.way[0]; rf_wb_data = r.d;
        ref_rf[r.warp][r.rg] = r.d;
        known[r.warp][r.rg] = 1;
        pend[r.warp][r.rg] = 0;
      end
      for (int w = 0; w < NW; w++) rf_ib_valid[w] = gen && waiting[w] == 0;
      #1;
      if (rf_iss_valid) begin
        int w;
        w = int'(rf_iss_warp);
        n_rf_issue++;
        chk(rf_ib_valid[w], "RF: issued a warp without an instruction");
        for (int s = 0; s < MS; s++)
          if (rf_ib_src_valid[w][s]) begin
            chk(!pend[w][rf_ib_src_reg[w][s]], "RF: RAW violated");
            exp_busy[w][s]  = 1;
            exp_known[w][s] = known[w][rf_ib_src_reg[w][s]];
            exp_val[w][s]   = ref_rf[w][rf_ib_src_reg[w][s]];
            waiting[w]++;
          end
        if (rf_ib_dst_valid[w]) begin
          res_t r;
          chk(!pend[w][rf_ib_dst_reg[w]], "RF: WAW violated");
          pend[w][rf_ib_dst_reg[w]] = 1;
          r.warp = w; r.rg = int'(rf_ib_dst_reg[w]); r.bank = int'(rf_iss_dst_bank);
          r.way = int'(rf_iss_dst_way); r.t = cyc + $urandom_range(2, 12); r.d = rand_word();
          pipe.push_back(r);
        end
      end
      for (int b = 0; b < NB; b++)
        if (rf_opnd_valid[b]) begin
          int w, s;
          w = int'(rf_opnd_tag[b][7:2]); s = int'(rf_opnd_tag[b][1:0]);
          n_opnd++;
          chk(w < NW && s < MS && exp_busy[w][s], "RF: unexpected operand");
          if (w < NW && s < MS && exp_busy[w][s]) begin
            if (exp_known[w][s]) chk(rf_opnd_data[b] == exp_val[w][s], "RF: operand value");
            exp_busy[w][s] = 0;
            waiting[w]--;
          end
        end
      n_wbr += $countones(rf_ev_wb_read);
      n_pig += $countones(rf_ev_piggyback);
      n_ovf += $countones(rf_ev_overflow);
      n_rfr += $countones(rf_ev_rf_read);
      n_sh_up += $countones(rf_ev_shift & rf_ev_shift_dir);
      n_sh_dn += $countones(rf_ev_shift & ~rf_ev_shift_dir);
      if (rf_ev_void) n_void++;
      if (rf_ev_stall_full) n_full++;
      if (rf_ev_stall_hazard) n_haz++;
      @(negedge clk);
      if (iss_q) new_instr(iss_w_q);
      if (!gen && pipe.size() == 0) begin
        bit idle;
        idle = 1;
        for (int w = 0; w < NW; w++) if (waiting[w] != 0) idle = 0;
        if (idle) break;
      end
    end
    rf_fin = 1;
  end

  // ======================= L1: VWS =======================
  bit amt_ref [8192];
  int progress [NW];
  initial begin : vws_proc
    int next_cta, done_ctas;
    foreach (vws_cta_id[w]) vws_cta_id[w] = 0;
    foreach (progress[w]) progress[w] = 0;
    foreach (n_class[c]) n_class[c] = 0;
    wait (rst_n);
    @(negedge clk);
    vws_launch = 1;
    @(negedge clk);
    vws_launch = 0;
    foreach (amt_ref[i]) amt_ref[i] = 0;
    chk(int'(vws_n_pred) == 8, "VWS: N_pred");
    next_cta = 30; done_ctas = 0;
    for (int cyc = 0; cyc < 60000 && done_ctas < 10; cyc++) begin
      int fin;
      vws_cta_pop = 0; vws_done_valid = 0; vws_acc_valid = 0; vws_miss_valid = 0;
      for (int b = 0; b < 6; b++)
        if (!vws_cta_pop && vws_slot_valid[b*8 +: 8] == 0 && !vws_cta_empty) begin
          chk(int'(vws_cta_next) == next_cta, "VWS: CTA order");
          next_cta++;
          vws_cta_pop = 1;
          for (int k = 0; k < 8; k++) begin
            vws_slot_valid[b*8+k] = 1; vws_cta_id[b*8+k] = vws_cta_next; progress[b*8+k] = 0;
          end
        end
      fin = -1;
      for (int w = 0; w < NW; w++) if (fin < 0 && vws_slot_valid[w] && progress[w] >= 80) fin = w;
      if (fin >= 0) begin vws_done_valid = 1; vws_done_warp = 6'(fin); end
      for (int w = 0; w < NW; w++) if ($urandom_range(0, 19) == 0) vws_stall[w] = !vws_stall[w];
      vws_ready = {$urandom, $urandom};
      #1;
      if (vws_issue_valid) begin
        int w;
        w = int'(vws_issue_warp);
        n_vws_issue++;
        chk(vws_level1[w] && vws_active[w] && vws_ready[w] && !vws_stall[w], "VWS: issue rule");
        if (w != fin) begin
          vws_acc_valid = 1; vws_acc_warp = 6'(w);
          if (progress[w] < 20) begin
            vws_miss_valid = 1; vws_miss_warp = 6'(w);
            vws_miss_blk = 25'((int'(vws_cta_id[w]) * 8 + w % 8) * 32 + progress[w]);
          end
          progress[w]++;
        end
      end
      #1;
      if (vws_miss_valid) begin
        chk(vws_ev_first_miss == !amt_ref[vws_miss_blk % 8192], "VWS: AMT");
        amt_ref[vws_miss_blk % 8192] = 1;
        if (vws_ev_first_miss) n_first++;
      end
      if (int'(vws_n_act) < NW) n_thr++;
      if (vws_ev_promote) n_class[vws_ev_promote_class]++;
      if (vws_ev_demote) n_demote++;
      if (vws_ev_amt_clear) begin n_clear++; foreach (amt_ref[i]) amt_ref[i] = 0; end
      @(negedge clk);
      if (fin >= 0) begin
        vws_slot_valid[fin] = 0;
        if (vws_slot_valid[(fin/8)*8 +: 8] == 0) done_ctas++;
      end
    end
    chk(done_ctas == 10, "VWS: all CTAs ran");
    chk(int'(vws_ws) == 320 && int'(vws_rrd) == 64 && int'(vws_n_act) == 13,
        "VWS: WS 20, RRDegr 4, N_act 13");
    vws_fin = 1;
  end

  // ======================= DRAM: TEMP + TBAS =======================
  int left [NW];
  initial begin : temp_proc
    int next_tb, tbs_done;
    foreach (temp_batch_id[w]) temp_batch_id[w] = 0;
    wait (rst_n);
    @(negedge clk);
    temp_launch = 1;
    @(negedge clk);
    temp_launch = 0;
    next_tb = 16; tbs_done = 0;
    for (int cyc = 0; cyc < 50000 && tbs_done < 8; cyc++) begin
      int oldest;
      bit cur_act, sw;
      temp_tb_pop = 0;
      for (int b = 0; b < 6; b++)
        if (!temp_tb_pop && temp_slot_valid[b*6 +: 6] == 0 && !temp_tb_empty) begin
          chk(int'(temp_tb_next) == next_tb && int'(temp_tb_next_batch) == next_tb / 4,
              "TEMP: block order");
          next_tb++;
          temp_tb_pop = 1;
          for (int k = 0; k < 6; k++) begin
            temp_slot_valid[b*6+k] = 1; temp_batch_id[b*6+k] = temp_tb_next_batch;
            left[b*6+k] = $urandom_range(5, 60);
          end
        end
      for (int w = 0; w < NW; w++) if ($urandom_range(0, 9) == 0) temp_stall[w] = !temp_stall[w];
      temp_ready = {$urandom, $urandom};
      temp_alloc_cpu = ($urandom_range(0, 3) == 0);
      temp_alloc_seq = 20'($urandom_range(0, 4095));
      #1;
      temp_mem_addr = {temp_alloc_frame, 12'($urandom)};
      if ($urandom_range(0, 3) == 0) temp_mem_addr = $urandom;
      #1;
      if (temp_mem_addr[31:12] == temp_alloc_frame) begin
        if (temp_alloc_cpu) begin
          n_cpu++;
          chk(int'(temp_mem_row) == 32767 - int'(temp_alloc_seq) / 32, "TEMP: CPU rows");
        end else
          chk(temp_mem_local, "TEMP: GPU page local");
      end
      if (temp_mem_local) n_local++; else n_remote++;
      oldest = -1; cur_act = 0;
      for (int w = 0; w < NW; w++)
        if (temp_slot_valid[w] && !temp_stall[w]) begin
          if (temp_cur_valid && temp_batch_id[w] == temp_cur_batch) cur_act = 1;
          else if (oldest < 0 || int'(temp_batch_id[w]) < oldest) oldest = int'(temp_batch_id[w]);
        end
      chk(temp_ev_switch == (!cur_act && oldest >= 0), "TEMP: switch rule");
      sw = temp_ev_switch;
      if (temp_issue_valid) begin
        int w;
        w = int'(temp_issue_warp);
        n_temp_issue++;
        chk(temp_slot_valid[w] && temp_ready[w] && !temp_stall[w] &&
            temp_batch_id[w] == temp_cur_batch, "TEMP: issue rule");
      end
      @(negedge clk);
      if (sw) begin
        n_switch++;
        chk(int'(temp_cur_batch) == oldest, "TEMP: oldest batch promoted");
      end
      if (temp_issue_valid) begin
        int w;
        w = int'(temp_issue_warp);
        left[w]--;
        if (left[w] == 0) begin
          temp_slot_valid[w] = 0;
          if (temp_slot_valid[(w/6)*6 +: 6] == 0) tbs_done++;
        end
      end
    end
    chk(tbs_done == 8, "TEMP: all blocks ran");
    temp_fin = 1;
  end

  // ======================= summary =======================
  task automatic need(input string name, input int n);
    checks++;
    $display("  %-22s %0d", name, n);
    if (n == 0) begin failures++; $display("  mechanism never happened: %s", name); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (rf_fin && vws_fin && temp_fin);
    repeat (50) @(negedge clk);
    $display("mechanism counts:");
    need("rf issue", n_rf_issue);
    need("rf operands", n_opnd);
    need("wb buffer read", n_wbr);
    need("piggyback write", n_pig);
    need("overflow writeback", n_ovf);
    need("track read", n_rfr);
    need("shift up", n_sh_up);
    need("shift down", n_sh_dn);
    need("void write", n_void);
    need("stall buffer full", n_full);
    need("stall hazard", n_haz);
    need("vws issue", n_vws_issue);
    need("amt first miss", n_first);
    need("amt clear", n_clear);
    need("throttled cycles", n_thr);
    need("promote empty L1", n_class[0]);
    need("promote same CTA", n_class[1]);
    need("promote precursor", n_class[2]);
    need("promote successor", n_class[3]);
    need("demote", n_demote);
    need("tbas issue", n_temp_issue);
    need("batch switch", n_switch);
    need("local access", n_local);
    need("remote access", n_remote);
    need("cpu frame", n_cpu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
