// Self-checking random test of rf_arbiter (one bank plus its write buffer).
//
// The testbench plays the write buffer index table: it allocates ways for
// writes to random registers, delivers their data some cycles later, counts
// reads in flight per way, raises an overflow request when both ways are
// taken, and frees a way on wb_done.  Reads of a register that sits in a way
// whose data has arrived are sent to the buffer; reads of a register whose
// data is still on its way are held back (as the scoreboard would); other
// reads go to the tracks.  A shadow copy of the bank is updated on wb_done,
// and every response is compared with the value expected when the read was
// queued.  Traffic is limited to 8 registers so that piggyback writes, reads
// of buffered data and blocked writebacks all happen often.  At the end the
// traffic stops and every outstanding read must be answered.
module tb_rf_arbiter;
  localparam int ENTRIES = 64, PORTS = 4, DATA_W = 32, WAYS = 2, MS = 3;
  localparam int SEG = ENTRIES / PORTS;
  localparam int QDEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              rd_valid   [MS];
  logic              rd_from_wb [MS];
  logic              rd_way     [MS];
  logic [1:0]        rd_port    [MS];
  logic [3:0]        rd_bml     [MS];
  logic [7:0]        rd_tag     [MS];
  logic [3:0]        q_free;
  logic              alloc_valid = 0, alloc_way = 0;
  logic [1:0]        alloc_port = 0;
  logic [3:0]        alloc_bml = 0;
  logic              wdata_valid = 0, wdata_way = 0;
  logic [DATA_W-1:0] wdata = 0;
  logic [WAYS-1:0]   way_ready;
  logic              ovf_req = 0, ovf_way = 0;
  logic              rsp_valid;
  logic [7:0]        rsp_tag;
  logic [DATA_W-1:0] rsp_data;
  logic              rd_done, rd_done_way, wb_done, wb_done_way;
  logic ev_wb_read, ev_piggyback, ev_overflow, ev_rf_read, ev_shift, ev_shift_dir;

  rf_arbiter #(.ENTRIES(ENTRIES), .PORTS(PORTS), .DATA_W(DATA_W), .WAYS(WAYS),
               .MAX_SRC(MS), .QDEPTH(QDEPTH), .TAG_W(8)) dut (.*);

  // model state
  logic [DATA_W-1:0] shadow [ENTRIES];
  bit      w_valid [WAYS], w_recv [WAYS];
  int      w_f [WAYS], w_row [WAYS], w_age [WAYS];
  logic [DATA_W-1:0] w_data [WAYS];
  bit      out_busy [256];
  logic [DATA_W-1:0] out_exp [256];
  int      next_tag = 0, outstanding = 0;
  int      n_piggy = 0, n_ovf = 0, n_wbr = 0, n_rfr = 0, n_blocked = 0;
  bit      traffic = 1;
  int      f_inc [WAYS];
  logic    rd_done_q, rd_done_way_q, wb_done_q, wb_done_way_q;

  function automatic int row_of(int port, int bml);
    return port * SEG + bml;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb
    for (int y = 0; y < WAYS; y++)
      way_ready[y] = w_valid[y] && w_recv[y] && w_f[y] == 0;

  initial begin
    for (int i = 0; i < ENTRIES; i++) shadow[i] = '0;
    for (int y = 0; y < WAYS; y++) begin
      w_valid[y] = 0; w_recv[y] = 0; w_f[y] = 0; w_row[y] = -1; w_age[y] = 0;
    end
    for (int s = 0; s < MS; s++) begin
      rd_valid[s] = 0; rd_from_wb[s] = 0; rd_way[s] = 0;
      rd_port[s] = 0; rd_bml[s] = 0; rd_tag[s] = 0;
    end
    // The bank has no reset: give the 8 test registers known values first.
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 8; r++) begin
      int port, bml;
      port = r % PORTS; bml = (r * 5) % SEG;
      alloc_valid = 1; alloc_way = 0; alloc_port = 2'(port); alloc_bml = 4'(bml);
      @(negedge clk); alloc_valid = 0;
      wdata_valid = 1; wdata_way = 0; wdata = $urandom;
      @(negedge clk); wdata_valid = 0;
      w_valid[0] = 1; w_recv[0] = 1; w_row[0] = row_of(port, bml); w_data[0] = wdata;
      ovf_req = 1; ovf_way = 0;
      #1;
      while (!wb_done) begin @(negedge clk); #1; end
      shadow[w_row[0]] = w_data[0];
      @(posedge clk); #1;
      w_valid[0] = 0;
      ovf_req = 0;
      repeat (20) @(negedge clk);
    end

    for (int cyc = 0; cyc < 20000 || outstanding > 0 || w_valid[0] || w_valid[1]; cyc++) begin
      if (cyc > 60000) break;
      traffic = cyc < 20000;
      // ---- drive inputs for this cycle ----
      for (int y = 0; y < WAYS; y++) f_inc[y] = 0;
      // data written at the last edge is now in the buffer
      if (wdata_valid) w_recv[wdata_way] = 1;
      alloc_valid = 0; wdata_valid = 0;
      for (int s = 0; s < MS; s++) rd_valid[s] = 0;
      // data delivery for one allocated way
      for (int y = 0; y < WAYS; y++)
        if (w_valid[y] && !w_recv[y] && !wdata_valid && w_age[y] > 2 && $urandom_range(0, 2) == 0) begin
          wdata_valid = 1; wdata_way = y[0]; wdata = $urandom;
          w_data[y] = wdata;
        end
      for (int y = 0; y < WAYS; y++) if (w_valid[y]) w_age[y]++;
      // allocation
      if (traffic && $urandom_range(0, 3) == 0) begin
        int y;
        y = -1;
        for (int i = WAYS - 1; i >= 0; i--) if (!w_valid[i]) y = i;
        if (y >= 0) begin
          int r, port, bml;
          bit clash;
          r = $urandom_range(0, 7);
          port = r % PORTS; bml = (r * 5) % SEG; clash = 0;
          for (int i = 0; i < WAYS; i++) if (w_valid[i] && w_row[i] == row_of(port, bml)) clash = 1;
          if (!clash) begin
            alloc_valid = 1; alloc_way = y[0]; alloc_port = 2'(port); alloc_bml = 4'(bml);
            w_valid[y] = 1; w_recv[y] = 0; w_f[y] = 0; w_row[y] = row_of(port, bml); w_age[y] = 0;
          end
        end
      end
      // overflow request when every way is taken
      ovf_req = 0;
      if (w_valid[0] && w_valid[1])
        for (int y = WAYS - 1; y >= 0; y--)
          if (way_ready[y]) begin ovf_req = 1; ovf_way = y[0]; end
      if (!traffic)
        for (int y = WAYS - 1; y >= 0; y--)
          if (way_ready[y]) begin ovf_req = 1; ovf_way = y[0]; end
      // reads
      if (traffic && q_free >= MS && $urandom_range(0, 1) == 0) begin
        int n;
        n = $urandom_range(1, MS);
        for (int s = 0; s < n; s++) begin
          int r, port, bml, row, hit;
          bit hold;
          r = $urandom_range(0, 7);
          port = r % PORTS; bml = (r * 5) % SEG; row = row_of(port, bml);
          hit = -1; hold = 0;
          for (int y = 0; y < WAYS; y++)
            if (w_valid[y] && w_row[y] == row) begin
              if (w_recv[y]) hit = y;
              else hold = 1;
            end
          if (!hold && !out_busy[next_tag]) begin
            rd_valid[s] = 1; rd_port[s] = 2'(port); rd_bml[s] = 4'(bml);
            rd_tag[s] = 8'(next_tag);
            out_busy[next_tag] = 1;
            outstanding++;
            if (hit >= 0) begin
              rd_from_wb[s] = 1; rd_way[s] = hit[0];
              out_exp[next_tag] = w_data[hit];
              f_inc[hit]++;
            end else begin
              rd_from_wb[s] = 0; rd_way[s] = 0;
              out_exp[next_tag] = shadow[row];
            end
            next_tag = (next_tag + 1) % 256;
          end
        end
      end
      #1;
      // ---- observe ----
      if (wb_done) begin
        checks++;
        if (!way_ready[wb_done_way]) begin
          failures++; $display("wb_done on a way that is not ready");
        end
        shadow[w_row[wb_done_way]] = w_data[wb_done_way];
      end
      if (ev_piggyback) n_piggy++;
      if (ev_overflow) n_ovf++;
      if (ev_wb_read) n_wbr++;
      if (ev_rf_read) n_rfr++;
      for (int y = 0; y < WAYS; y++)
        if (way_ready[y] && ovf_req && ovf_way == y[0] && !wb_done && dut.bk_req_ready) n_blocked++;
      if (rd_done) begin
        checks++;
        if (w_f[rd_done_way] <= 0) begin failures++; $display("rd_done without read t=%0t", $time); end
      end
      rd_done_q = rd_done; rd_done_way_q = rd_done_way;
      wb_done_q = wb_done; wb_done_way_q = wb_done_way;
      if (rsp_valid) begin
        checks++;
        if (!out_busy[rsp_tag]) begin
          failures++; $display("response with unknown tag %0d", rsp_tag);
        end else begin
          if (rsp_data !== out_exp[rsp_tag]) begin
            failures++;
            $display("tag %0d data %h expected %h", rsp_tag, rsp_data, out_exp[rsp_tag]);
          end
          out_busy[rsp_tag] = 0;
          outstanding--;
        end
      end
      // the write buffer table changes at the clock edge
      @(posedge clk); #1;
      for (int y = 0; y < WAYS; y++) w_f[y] += f_inc[y];
      if (rd_done_q) w_f[rd_done_way_q]--;
      if (wb_done_q) begin w_valid[wb_done_way_q] = 0; w_row[wb_done_way_q] = -1; end
      @(negedge clk);
    end
    checks++;
    if (outstanding != 0) begin failures++; $display("%0d reads never answered", outstanding); end
    $display("piggyback=%0d overflow=%0d wb_read=%0d rf_read=%0d blocked=%0d",
             n_piggy, n_ovf, n_wbr, n_rfr, n_blocked);
    checks += 4;
    if (n_piggy == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_wbr == 0) failures++;
    if (n_rfr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
