// Self-checking test of rm_bank: random reads and writes against a reference
// array; every response must come exactly shift-distance + latency cycles
// (read 1, write 2) after acceptance, with the read data of the reference.
//
// Timing: a 10-time-unit clock; stimulus changes just after a rising edge,
// combinational outputs are checked before the next edge and registered
// state after it.  A watchdog ends the run with a failure if it hangs.
module tb_rm_bank;
  localparam int ENTRIES = 64, PORTS = 4, DW = 64, SEG = ENTRIES / PORTS;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [1:0] req_port = 0;
  logic [3:0] req_bml = 0, loc;
  logic [DW-1:0] req_wdata = 0, rsp_rdata;
  logic rsp_valid, rsp_we, shift_pulse, shift_dir;
  logic [DW-1:0] ref_mem [ENTRIES];
  logic          ref_ok  [ENTRIES];
  int checks = 0, failures = 0, shifts = 0;

  rm_bank #(.ENTRIES(ENTRIES), .PORTS(PORTS), .DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (shift_pulse) shifts++;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_loc, d, lat, cyc, row;
    foreach (ref_ok[i]) ref_ok[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_loc = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req_port  = 2'($urandom_range(0, PORTS - 1));
      req_bml   = 4'($urandom_range(0, SEG - 1));
      row       = int'(req_port) * SEG + int'(req_bml);
      req_we    = (t < 64) ? 1'b1 : ($urandom_range(0, 2) == 0);
      req_wdata = {$urandom, $urandom};
      req_valid = 1;
      checks++;
      if (!req_ready) failures++;
      @(negedge clk);
      req_valid = 0;
      d   = (int'(req_bml) > exp_loc) ? int'(req_bml) - exp_loc : exp_loc - int'(req_bml);
      lat = req_we ? 2 : 1;
      cyc = 0;
      while (!rsp_valid && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != d + lat) begin
        failures++;
        $display("latency %0d expected %0d", cyc, d + lat);
      end
      if (req_we) begin
        ref_mem[row] = req_wdata;
        ref_ok[row]  = 1;
      end else if (ref_ok[row]) begin
        checks++;
        if (rsp_rdata != ref_mem[row]) begin
          failures++;
          $display("read row %0d got %h expected %h", row, rsp_rdata, ref_mem[row]);
        end
      end
      exp_loc = int'(req_bml);
    end
    checks++;
    if (shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
