// Self-checking test of rm_shift_ctrl: random targets, the location must
// reach each target in exactly |target - location| cycles, one bit per cycle,
// with the pulse and direction outputs consistent.
//
// Timing: a 10-time-unit clock; stimulus changes just after a rising edge,
// combinational outputs are checked before the next edge and registered
// state after it.  A watchdog ends the run with a failure if it hangs.
module tb_rm_shift_ctrl;
  localparam int SEG = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] tgt, loc;
  logic aligned, shift_pulse, shift_dir;
  int checks = 0, failures = 0;

  rm_shift_ctrl #(.SEG(SEG)) dut (.*, .tgt_bml(tgt));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_loc, cyc, d;
    tgt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_loc = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      tgt = 4'($urandom_range(0, SEG - 1));
      #1;
      d   = (int'(tgt) > exp_loc) ? int'(tgt) - exp_loc : exp_loc - int'(tgt);
      en  = 1;
      cyc = 0;
      #1;
      if (int'(loc) != exp_loc) $display("t=%0d time=%0t tgt=%0d loc=%0d aligned=%0d", t, $time, tgt, loc, aligned);
      while (!aligned) begin
        checks++;
        if (!shift_pulse || shift_dir != (int'(tgt) > int'(loc))) failures++;
        @(negedge clk);
        #1;
        cyc++;
      end
      en = 0;
      checks++;
      if (cyc != d || int'(loc) != int'(tgt)) begin
        failures++;
        $display("shift to %0d took %0d cycles, expected %0d", tgt, cyc, d);
      end
      exp_loc = int'(tgt);
      // idle: no movement without en
      @(negedge clk);
      checks++;
      if (loc != tgt || shift_pulse) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
