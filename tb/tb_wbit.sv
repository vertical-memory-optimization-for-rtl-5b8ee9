// Self-checking test of wbit: allocation, RAW hazard before the data
// arrives, read from the write buffer with the in-flight counter F, WAW
// hazard while F > 0, WAW voiding once F = 0, full set without a ready way,
// overflow request naming the ready way, recycling on writeback, and an
// instruction that reads and rewrites the same buffered register.
//
// Timing: a 10-time-unit clock; stimulus changes just after a rising edge,
// combinational outputs are checked before the next edge and registered
// state after it.  A watchdog ends the run with a failure if it hangs.
module tb_wbit;
  localparam int NB = 16, WY = 2, MS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] chk_warp = 0, chk_dst_reg = 0;
  logic       chk_dst_valid = 0;
  logic [3:0] chk_dst_bank = 0;
  logic       chk_src_valid [MS];
  logic [5:0] chk_src_reg   [MS];
  logic [3:0] chk_src_bank  [MS];
  logic can_issue, stall_full, stall_hazard, dst_void, ovf_req;
  logic src_hit [MS];
  logic src_way [MS];
  logic dst_way, ovf_way;
  logic [3:0] ovf_bank;
  logic issue_fire = 0;
  logic [NB-1:0] rd_done = 0, wb_done = 0;
  logic rd_done_way [NB];
  logic wb_done_way [NB];
  logic wr_data = 0;
  logic [3:0] wr_data_bank = 0;
  logic wr_data_way = 0;
  logic [WY-1:0] way_ready [NB];
  logic [WY-1:0] way_valid [NB];

  wbit dut (.*);

  task automatic expect_(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic set_instr(input int w, input bit dv, input int dr, input int db,
                           input bit sv0, input int sr0, input int sb0);
    chk_warp = 6'(w); chk_dst_valid = dv; chk_dst_reg = 6'(dr); chk_dst_bank = 4'(db);
    chk_src_valid[0] = sv0; chk_src_reg[0] = 6'(sr0); chk_src_bank[0] = 4'(sb0);
    #1;
  endtask

  task automatic fire();
    issue_fire = 1;
    @(negedge clk);
    issue_fire = 0;
    #1;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < MS; s++) begin
      chk_src_valid[s] = 0; chk_src_reg[s] = 0; chk_src_bank[s] = 0;
    end
    foreach (rd_done_way[b]) begin rd_done_way[b] = 0; wb_done_way[b] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. warp 1 writes r3 (bank 5)
    set_instr(1, 1, 3, 5, 0, 0, 0);
    expect_("alloc can_issue", can_issue, 1);
    expect_("alloc way", dst_way, 0);
    fire();
    expect_("way0 valid", way_valid[5][0], 1);
    // 2. RAW before the data arrives
    set_instr(1, 0, 0, 0, 1, 3, 5);
    expect_("RAW hazard", stall_hazard, 1);
    expect_("RAW no issue", can_issue, 0);
    // 3. data arrives, read from the buffer
    wr_data = 1; wr_data_bank = 5; wr_data_way = 0;
    @(negedge clk); wr_data = 0; #1;
    expect_("ready after data", way_ready[5][0], 1);
    set_instr(1, 0, 0, 0, 1, 3, 5);
    expect_("src hit", src_hit[0], 1);
    expect_("src issue", can_issue, 1);
    fire();
    expect_("F>0 not ready", way_ready[5][0], 0);
    // 4. WAW while a read is in flight
    set_instr(1, 1, 3, 5, 0, 0, 0);
    expect_("WAW hazard F>0", stall_hazard, 1);
    rd_done[5] = 1; rd_done_way[5] = 0;
    @(negedge clk); rd_done = 0; #1;
    expect_("ready after rd_done", way_ready[5][0], 1);
    set_instr(1, 1, 3, 5, 0, 0, 0);
    expect_("WAW void", dst_void, 1);
    expect_("WAW void issue", can_issue, 1);
    fire();
    expect_("voided entry waits for data", way_ready[5][0], 0);
    // 5. fill the set
    set_instr(2, 1, 7, 5, 0, 0, 0);
    expect_("second way", dst_way, 1);
    fire();
    set_instr(3, 1, 9, 5, 0, 0, 0);
    expect_("full", stall_full, 1);
    expect_("full no ovf (none ready)", ovf_req, 0);
    wr_data = 1; wr_data_bank = 5; wr_data_way = 1;
    @(negedge clk); wr_data = 0; #1;
    set_instr(3, 1, 9, 5, 0, 0, 0);
    expect_("full still", stall_full, 1);
    expect_("ovf requested", ovf_req, 1);
    expect_("ovf way", ovf_way, 1);
    checks++; if (ovf_bank != 5) failures++;
    wb_done[5] = 1; wb_done_way[5] = 1;
    @(negedge clk); wb_done = 0; #1;
    set_instr(3, 1, 9, 5, 0, 0, 0);
    expect_("recycled", can_issue, 1);
    expect_("recycled way", dst_way, 1);
    // 6. an instruction that reads and writes the same buffered register:
    //    no void (it would overwrite the value before the read); the entry
    //    is sent back to the RF first
    set_instr(5, 1, 4, 7, 0, 0, 0);
    fire();
    wr_data = 1; wr_data_bank = 7; wr_data_way = 0;
    @(negedge clk); wr_data = 0; #1;
    set_instr(5, 1, 4, 7, 1, 4, 7);
    expect_("self read hit", src_hit[0], 1);
    expect_("self read no void", dst_void, 0);
    expect_("self read waits", can_issue, 0);
    expect_("self read writeback", ovf_req, 1);
    expect_("self read writeback way", ovf_way, 0);
    checks++; if (ovf_bank != 7) failures++;
    wb_done[7] = 1; wb_done_way[7] = 0;
    @(negedge clk); wb_done = 0; #1;
    set_instr(5, 1, 4, 7, 1, 4, 7);
    expect_("self read from RF", src_hit[0], 0);
    expect_("self read issues", can_issue, 1);
    // other banks unaffected
    set_instr(4, 1, 9, 6, 0, 0, 0);
    expect_("other bank free", can_issue, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
