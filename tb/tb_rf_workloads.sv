// Register-file workloads at full size: rmws_rf with its default parameters
// (48 warp slots, 16 banks of 64 x 1024-bit warp registers, 4-port 64-bit
// racetracks, 2 write-buffer ways per bank) runs, one after another, the
// register-file footprints of several evaluated applications:
//   WP 63 regs x 16 warps (63 rows per bank, the largest), STO 48 x 12,
//   LBM 36 x 27, BINO 20 x 48, CP 15 x 32, NN 21 x 8 (the smallest).
// For each one the file is reset, the launch constants are set (registers
// per warp, and an offset that centres the used bits in each port segment:
// offset = (16 - ceil(rows/4)) / 2), and the active warps run random
// instruction streams over all their registers for 3000 cycles.
//
// How it works: the testbench is the instruction buffer, the collector units
// and the writeback stage.  At issue it records, from a reference register
// file, the value every source must return; results pass a random 2..12
// cycle execution delay and are written back through the write-buffer way
// named at issue.  Checks: every operand equals the reference, no source or
// destination issues while an older result to it is in flight, every read
// is answered and every result drains, the planned bank position never
// leaves the used bit range, and each workload issues instructions.
// Write-buffer reads, piggyback and overflow writebacks, track reads and
// shifts must each occur (a mechanism that never happens is a failure).
//
// Timing: inputs change at the falling edge, outputs are sampled just before
// the rising edge.  A watchdog ends the run with a failure if it hangs.
module tb_rf_workloads;
  localparam int NW = 48, NB = 16, DW = 1024, MS = 3, MAXR = 64, NWL = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0]    cfg_num_reg_warp = 1;
  logic [3:0]    cfg_offset = 0;
  logic [NW-1:0] ib_valid = 0;
  logic          ib_dst_valid [NW];
  logic [5:0]    ib_dst_reg   [NW];
  logic          ib_src_valid [NW][MS];
  logic [5:0]    ib_src_reg   [NW][MS];
  logic          iss_valid;
  logic [5:0]    iss_warp;
  logic [15:0]   iss_score;
  logic [3:0]    iss_dst_bank;
  logic          iss_dst_way;
  logic          opnd_valid [NB];
  logic [7:0]    opnd_tag   [NB];
  logic [DW-1:0] opnd_data  [NB];
  logic          wb_valid = 0;
  logic [3:0]    wb_bank = 0;
  logic          wb_way = 0;
  logic [DW-1:0] wb_data = 0;
  logic [NB-1:0] ev_wb_read, ev_piggyback, ev_overflow, ev_rf_read, ev_shift, ev_shift_dir;
  logic          ev_void, ev_stall_full, ev_stall_hazard;
  logic [3:0]    plan_bml    [NB];
  logic [1:0]    wb_occupied [NB];

  rmws_rf dut (.*);

  // workload table: registers per thread, resident warps
  int wl_regs  [NWL] = '{63, 48, 36, 20, 15, 21};
  int wl_warps [NWL] = '{16, 12, 27, 48, 32, 8};
  string wl_name [NWL] = '{"WP", "STO", "LBM", "BINO", "CP", "NN"};

  logic [DW-1:0] ref_rf [NW][MAXR];
  bit            known  [NW][MAXR];
  bit            pend   [NW][MAXR];
  int            waiting [NW];
  bit            exp_known [NW][MS];
  logic [DW-1:0] exp_val   [NW][MS];
  bit            exp_busy  [NW][MS];
  typedef struct { int warp; int rg; int bank; int way; int t; logic [DW-1:0] d; } res_t;
  res_t          pipe [$];
  int            cyc, nreg, nwarp, lo, hi;
  bit            gen;
  int n_wbr = 0, n_pig = 0, n_ovf = 0, n_rfr = 0, n_sh = 0, n_issue;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  task automatic new_instr(input int w);
    ib_dst_valid[w] = $urandom_range(0, 5) != 0;
    ib_dst_reg[w]   = 6'($urandom_range(0, nreg - 1));
    for (int s = 0; s < MS; s++) begin
      ib_src_valid[w][s] = $urandom_range(0, 3) != 0;
      ib_src_reg[w][s]   = 6'($urandom_range(0, nreg - 1));
    end
  endtask

  function automatic logic [DW-1:0] rand_word();
    logic [DW-1:0] v;
    for (int i = 0; i < DW / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue seen in the last cycle (sampled before the edge)
  logic       iss_valid_q = 0;
  logic [5:0] iss_warp_q = 0;
  always @(posedge clk) begin
    iss_valid_q <= iss_valid;
    iss_warp_q  <= iss_warp;
  end

  initial begin
    for (int k = 0; k < NWL; k++) begin
      int rows, segs;
      nreg  = wl_regs[k];
      nwarp = wl_warps[k];
      rows  = (nreg * nwarp + NB - 1) / NB;
      segs  = (rows + 3) / 4;
      chk(rows <= 64, "workload does not fit the bank");
      // reset and launch
      @(negedge clk);
      rst_n = 0;
      ib_valid = 0;
      wb_valid = 0;
      cfg_num_reg_warp = 6'(nreg);
      cfg_offset = 4'((16 - segs) / 2);
      lo = int'(cfg_offset);
      hi = lo + segs - 1;
      pipe.delete();
      for (int w = 0; w < NW; w++) begin
        waiting[w] = 0;
        for (int r = 0; r < MAXR; r++) begin known[w][r] = 0; pend[w][r] = 0; ref_rf[w][r] = 0; end
        for (int s = 0; s < MS; s++) exp_busy[w][s] = 0;
        new_instr(w);
      end
      repeat (2) @(negedge clk);
      rst_n = 1;
      cyc = 0;
      n_issue = 0;
      forever begin
        int wbi;
        cyc++;
        gen = cyc < 3000;
        wb_valid = 0;
        wbi = -1;
        foreach (pipe[i]) if (wbi < 0 && pipe[i].t <= cyc) wbi = i;
        if (wbi >= 0) begin
          res_t r;
          r = pipe[wbi];
          pipe.delete(wbi);
          wb_valid = 1; wb_bank = 4'(r.bank); wb_way = r.way[0]; wb_data = r.d;
          ref_rf[r.warp][r.rg] = r.d;
          known[r.warp][r.rg] = 1;
          pend[r.warp][r.rg] = 0;
        end
        for (int w = 0; w < NW; w++) ib_valid[w] = gen && w < nwarp && waiting[w] == 0;
        #1;
        if (iss_valid) begin
          int w;
          w = int'(iss_warp);
          n_issue++;
          chk(w < nwarp && ib_valid[w], "issued a warp without an instruction");
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
            r.way = int'(iss_dst_way); r.t = cyc + $urandom_range(2, 12); r.d = rand_word();
            pipe.push_back(r);
          end
        end
        for (int b = 0; b < NB; b++) begin
          if (opnd_valid[b]) begin
            int w, s;
            w = int'(opnd_tag[b][7:2]); s = int'(opnd_tag[b][1:0]);
            chk(w < NW && s < MS && exp_busy[w][s], "unexpected operand");
            if (w < NW && s < MS && exp_busy[w][s]) begin
              if (exp_known[w][s])
                chk(opnd_data[b] == exp_val[w][s],
                    $sformatf("%s operand w%0d s%0d wrong", wl_name[k], w, s));
              exp_busy[w][s] = 0;
              waiting[w]--;
            end
          end
          // once a bank has been used, its planned position stays in the used range
          if (int'(plan_bml[b]) != 0)
            chk(int'(plan_bml[b]) >= lo && int'(plan_bml[b]) <= hi,
                $sformatf("%s bank %0d planned BML %0d outside %0d..%0d", wl_name[k], b,
                          plan_bml[b], lo, hi));
        end
        n_wbr += $countones(ev_wb_read);
        n_pig += $countones(ev_piggyback);
        n_ovf += $countones(ev_overflow);
        n_rfr += $countones(ev_rf_read);
        n_sh  += $countones(ev_shift);
        @(posedge clk); #1;
        @(negedge clk);
        if (iss_valid_q) new_instr(iss_warp_q);
        if (!gen && pipe.size() == 0) begin
          bit idle;
          idle = 1;
          for (int w = 0; w < NW; w++) if (waiting[w] != 0) idle = 0;
          if (idle) break;
        end
      end
      repeat (200) @(negedge clk);
      $display("%s: %0d regs x %0d warps, %0d rows/bank, BML %0d..%0d, %0d instructions",
               wl_name[k], nreg, nwarp, rows, lo, hi, n_issue);
      chk(n_issue > 100, "workload issued too little");
    end
    $display("wb_read=%0d piggyback=%0d overflow=%0d rf_read=%0d shift=%0d",
             n_wbr, n_pig, n_ovf, n_rfr, n_sh);
    checks += 5;
    if (n_wbr == 0) failures++;
    if (n_pig == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_rfr == 0) failures++;
    if (n_sh == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
