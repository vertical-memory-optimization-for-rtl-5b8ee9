// Self-checking test of page_color_map at the evaluated size (32-bit
// address, 4 KB pages, 2 channels x 16 banks, 8 SMs).  Checks the decode of
// random addresses against a reference field split, that every frame given
// to an SM decodes back to that SM (local), that each SM's pages spread over
// its 4 colours, that distinct sequence numbers give distinct frames, and
// that CPU frames take rows from the top of the bank and never collide with
// the GPU frames of the test.
//
// Timing: the block is combinational; each input set is applied, settled
// for one time unit and checked.  A watchdog ends the run with a failure
// if it hangs.
module tb_page_color_map;
  localparam int ADDR_W = 32, PAGE_BITS = 12, CHANNELS = 2, BANKS = 16, N_SM = 8;
  int checks = 0, failures = 0;
  logic [ADDR_W-1:0] addr;
  logic [2:0] req_sm, alloc_sm, owner_sm;
  logic [0:0] channel;
  logic [3:0] bank;
  logic [14:0] row;
  logic [11:0] column;
  logic local_access, alloc_cpu;
  logic [19:0] seq, frame;
  bit used [int];
  int n_local = 0, n_remote = 0;

  page_color_map #(.ADDR_W(ADDR_W), .PAGE_BITS(PAGE_BITS), .CHANNELS(CHANNELS),
                   .BANKS(BANKS), .N_SM(N_SM)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_cpu = 0; alloc_sm = 0; seq = 0; req_sm = 0;
    // decode
    for (int i = 0; i < 5000; i++) begin
      int color;
      addr = $urandom; req_sm = 3'($urandom);
      #1;
      color = int'(addr[16:12]);
      chk(column == addr[11:0], "column");
      chk(int'(channel) == color % 2, "channel");
      chk(int'(bank) == color / 2, "bank");
      chk(row == addr[31:17], "row");
      chk(int'(owner_sm) == color / 4, "owner");
      chk(local_access == (int'(owner_sm) == int'(req_sm)), "local flag");
      if (local_access) n_local++; else n_remote++;
    end
    // frames
    for (int sm = 0; sm < N_SM; sm++) begin
      bit colors [int];
      colors.delete();
      for (int s = 0; s < 64; s++) begin
        alloc_sm = 3'(sm); alloc_cpu = 0; seq = 20'(s);
        #1;
        addr = {frame, 12'h0}; req_sm = 3'(sm);
        #1;
        chk(local_access, "GPU frame not local to its SM");
        chk(!used.exists(int'(frame)), "frame reused");
        chk(int'(row) == s / 4, "GPU row numbering");
        used[int'(frame)] = 1;
        colors[int'(addr[16:12])] = 1;
      end
      chk(colors.num() == 4, "SM pages not spread over its colours");
    end
    for (int s = 0; s < 256; s++) begin
      alloc_cpu = 1; seq = 20'(s);
      #1;
      addr = {frame, 12'h0};
      #1;
      chk(!used.exists(int'(frame)), "CPU frame collides");
      chk(int'(row) == 32767 - s / 32, "CPU row from the top");
      used[int'(frame)] = 1;
    end
    checks++;
    if (n_local == 0 || n_remote == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
