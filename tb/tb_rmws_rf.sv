// Self-checking random test of rmws_rf (reduced size: 8 warps, 4 banks,
// 64-entry banks with 4 ports, 32-bit registers, 2 write-buffer ways).
//
// The testbench plays instruction buffer, collector units and writeback
// stage.  Every warp runs a random instruction stream over 8 registers
// (up to 3 sources and one destination).  When a warp issues, the value
// each source must return is taken from a reference register file; the
// warp waits for its operands (tagged {warp, slot}), then moves on to its
// next instruction while its result goes through a random execution delay
// and is written back through the way given at issue.  The reference file
// is updated when the result reaches the write buffer.  Checks:
//   * every operand equals the reference value at issue;
//   * no instruction issues while one of its sources or its destination has
//     a result still on its way (the RAW/WAW rules);
//   * every read is answered and every result drains at the end;
//   * reads from the write buffer, piggyback and overflow writebacks, track
//     reads, shifts, voided writes, full-set stalls and hazard stalls all
//     occur (a mechanism that never happens counts as a failure).
module tb_rmws_rf;
  localparam int NW = 8, NB = 4, ENTRIES = 64, PORTS = 4, DW = 32, WAYS = 2, MS = 3;
  localparam int NREG = 8, SEG = ENTRIES / PORTS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0]    cfg_num_reg_warp = NREG;
  logic [3:0]    cfg_offset = 0;
  logic [NW-1:0] ib_valid = 0;
  logic          ib_dst_valid [NW];
  logic [5:0]    ib_dst_reg   [NW];
  logic          ib_src_valid [NW][MS];
  logic [5:0]    ib_src_reg   [NW][MS];
  logic          iss_valid;
  logic [2:0]    iss_warp;
  logic [SEG-1:0] iss_score;
  logic [1:0]    iss_dst_bank;
  logic          iss_dst_way;
  logic          opnd_valid [NB];
  logic [7:0]    opnd_tag   [NB];
  logic [DW-1:0] opnd_data  [NB];
  logic          wb_valid = 0;
  logic [1:0]    wb_bank = 0;
  logic          wb_way = 0;
  logic [DW-1:0] wb_data = 0;
  logic [NB-1:0] ev_wb_read, ev_piggyback, ev_overflow, ev_rf_read, ev_shift, ev_shift_dir;
  logic          ev_void, ev_stall_full, ev_stall_hazard;
  logic [3:0]    plan_bml    [NB];
  logic [1:0]    wb_occupied [NB];

  rmws_rf #(.NUM_WARPS(NW), .NUM_BANKS(NB), .ENTRIES(ENTRIES), .PORTS(PORTS),
            .DATA_W(DW), .WAYS(WAYS)) dut (.*);

  // reference and warp state
  logic [DW-1:0] ref_rf [NW][NREG];
  bit            known  [NW][NREG];
  bit            pend   [NW][NREG];   // result issued, not yet in the buffer
  int            waiting [NW];        // operands still to come
  bit            exp_known [NW][MS];
  logic [DW-1:0] exp_val   [NW][MS];
  bit            exp_busy  [NW][MS];
  // results in execution
  typedef struct { int warp; int rg; int bank; int way; int t; logic [DW-1:0] d; } res_t;
  res_t          pipe [$];
  int            cyc = 0;
  bit            gen = 1;
  int n_wbr = 0, n_pig = 0, n_ovf = 0, n_rfr = 0, n_sh = 0, n_void = 0, n_full = 0, n_haz = 0;
  int n_issue = 0, n_opnd = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  task automatic new_instr(input int w);
    ib_dst_valid[w] = $urandom_range(0, 5) != 0;
    ib_dst_reg[w]   = 6'($urandom_range(0, NREG - 1));
    for (int s = 0; s < MS; s++) begin
      ib_src_valid[w][s] = $urandom_range(0, 3) != 0;
      ib_src_reg[w][s]   = 6'($urandom_range(0, NREG - 1));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NW; w++) begin
      waiting[w] = 0;
      for (int r = 0; r < NREG; r++) begin known[w][r] = 0; pend[w][r] = 0; ref_rf[w][r] = 0; end
      for (int s = 0; s < MS; s++) exp_busy[w][s] = 0;
      new_instr(w);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    forever begin
      int wbi;
      cyc++;
      gen = cyc < 30000;
      // writeback stage: one result per cycle, oldest ready first
      wb_valid = 0;
      wbi = -1;
      foreach (pipe[i]) if (wbi < 0 && pipe[i].t <= cyc) wbi = i;
      if (wbi >= 0) begin
        res_t r;
        r = pipe[wbi];
        pipe.delete(wbi);
        wb_valid = 1; wb_bank = 2'(r.bank); wb_way = r.way[0]; wb_data = r.d;
        ref_rf[r.warp][r.rg] = r.d;
        known[r.warp][r.rg] = 1;
        pend[r.warp][r.rg] = 0;
      end
      for (int w = 0; w < NW; w++) ib_valid[w] = gen && waiting[w] == 0;
      #1;
      // ---- observe ----
      if (iss_valid) begin
        int w;
        w = int'(iss_warp);
        n_issue++;
        chk(ib_valid[w], "issued a warp without an instruction");
        for (int s = 0; s < MS; s++)
          if (ib_src_valid[w][s]) begin
            chk(!pend[w][ib_src_reg[w][s]], "RAW: source issued before its result");
            exp_busy[w][s]  = 1;
            exp_known[w][s] = known[w][ib_src_reg[w][s]];
            exp_val[w][s]   = ref_rf[w][ib_src_reg[w][s]];
            waiting[w]++;
          end
        if (ib_dst_valid[w]) begin
          res_t r;
          chk(!pend[w][ib_dst_reg[w]], "WAW: destination issued before the older result");
          pend[w][ib_dst_reg[w]] = 1;
          r.warp = w; r.rg = int'(ib_dst_reg[w]); r.bank = int'(iss_dst_bank);
          r.way = int'(iss_dst_way); r.t = cyc + $urandom_range(2, 12); r.d = $urandom;
          pipe.push_back(r);
        end
        // the next instruction is presented after the clock edge
      end
      for (int b = 0; b < NB; b++)
        if (opnd_valid[b]) begin
          int w, s;
          w = int'(opnd_tag[b][7:2]); s = int'(opnd_tag[b][1:0]);
          n_opnd++;
          chk(w < NW && s < MS && exp_busy[w][s], "unexpected operand");
          if (w < NW && s < MS && exp_busy[w][s]) begin
            if (exp_known[w][s])
              chk(opnd_data[b] == exp_val[w][s], $sformatf("operand w%0d s%0d data %h expected %h",
                  w, s, opnd_data[b], exp_val[w][s]));
            exp_busy[w][s] = 0;
            waiting[w]--;
          end
        end
      begin
        int occ;
        occ = 0;
        for (int b = 0; b < NB; b++) occ += $countones(wb_occupied[b]);
        chk(occ <= NB * WAYS, "write buffer occupancy");
      end
      n_wbr += $countones(ev_wb_read);
      n_pig += $countones(ev_piggyback);
      n_ovf += $countones(ev_overflow);
      n_rfr += $countones(ev_rf_read);
      n_sh  += $countones(ev_shift);
      if (ev_void) n_void++;
      if (ev_stall_full) n_full++;
      if (ev_stall_hazard) n_haz++;
      @(posedge clk); #1;
      @(negedge clk);
      // retire the issued instruction
      if (iss_valid_q) new_instr(iss_warp_q);
      if (!gen && pipe.size() == 0) begin
        bit idle;
        idle = 1;
        for (int w = 0; w < NW; w++) if (waiting[w] != 0) idle = 0;
        if (idle) break;
      end
    end
    // let the buffered results drain into the banks
    repeat (200) @(negedge clk);
    $display("issue=%0d operands=%0d wb_read=%0d piggyback=%0d overflow=%0d rf_read=%0d shift=%0d void=%0d full=%0d hazard=%0d",
             n_issue, n_opnd, n_wbr, n_pig, n_ovf, n_rfr, n_sh, n_void, n_full, n_haz);
    checks += 8;
    if (n_wbr == 0) failures++;
    if (n_pig == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_rfr == 0) failures++;
    if (n_sh == 0) failures++;
    if (n_void == 0) failures++;
    if (n_full == 0) failures++;
    if (n_haz == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue seen in the last cycle (sampled before the edge)
  logic       iss_valid_q = 0;
  logic [2:0] iss_warp_q = 0;
  always @(posedge clk) begin
    iss_valid_q <= iss_valid;
    iss_warp_q  <= iss_warp;
  end
endmodule
