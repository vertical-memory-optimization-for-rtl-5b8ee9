// Self-checking test of intracl: for random slot occupancies and limits the
// active set must be exactly the first n_act occupied slots in slot order,
// at the full 48-warp size.  Includes n_act = 0, n_act larger than the
// occupancy and the all-slots case.
//
// Timing: the block is combinational; each input set is applied, settled
// for one time unit and checked.  A watchdog ends the run with a failure
// if it hangs.
module tb_intracl;
  localparam int NUM_WARPS = 48;
  int checks = 0, failures = 0;
  logic [NUM_WARPS-1:0] slot_valid, active, exp_act;
  logic [$clog2(NUM_WARPS):0] n_act;

  intracl #(.NUM_WARPS(NUM_WARPS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int seen;
      slot_valid = {$urandom, $urandom};
      if (i % 7 == 0) slot_valid = '1;
      if (i % 11 == 0) slot_valid = '0;
      n_act = ($clog2(NUM_WARPS)+1)'($urandom_range(0, NUM_WARPS));
      if (i % 13 == 0) n_act = 0;
      seen = 0;
      for (int w = 0; w < NUM_WARPS; w++) begin
        exp_act[w] = slot_valid[w] && seen < int'(n_act);
        if (slot_valid[w]) seen++;
      end
      #1;
      checks++;
      if (active !== exp_act) begin
        failures++;
        $display("valid %h n_act %0d active %h expected %h", slot_valid, n_act, active, exp_act);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
