// Self-checking test of amt: the first miss of a block reports first_miss,
// repeats do not, clear empties the table, and random traffic is compared
// with a reference table indexed the same way (low 13 bits of the block).
//
// Timing: a 10-time-unit clock; stimulus changes just after a rising edge,
// combinational outputs are checked before the next edge and registered
// state after it.  A watchdog ends the run with a failure if it hangs.
module tb_amt;
  localparam int ENTRIES = 8192, BLK_W = 25;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, miss_valid = 0, first_miss;
  logic [BLK_W-1:0] miss_blk = 0;
  bit ref_tab [ENTRIES];
  int n_first = 0, n_repeat = 0, n_clear = 0;

  amt #(.ENTRIES(ENTRIES), .BLK_W(BLK_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_tab[i]) ref_tab[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 30000; i++) begin
      clear = ($urandom_range(0, 2999) == 0);
      miss_valid = !clear && $urandom_range(0, 1);
      // small block pool so that repeats and aliases happen
      miss_blk = BLK_W'($urandom_range(0, 3) * ENTRIES + $urandom_range(0, 2047));
      #1;
      if (miss_valid) begin
        checks++;
        if (first_miss !== !ref_tab[miss_blk % ENTRIES]) begin
          failures++;
          $display("blk %h first_miss %0d", miss_blk, first_miss);
        end
        if (first_miss) n_first++; else n_repeat++;
        ref_tab[miss_blk % ENTRIES] = 1;
      end
      if (clear) begin
        n_clear++;
        foreach (ref_tab[j]) ref_tab[j] = 0;
      end
      @(negedge clk);
    end
    checks += 3;
    if (n_first == 0 || n_repeat == 0 || n_clear == 0) failures++;
    $display("first=%0d repeat=%0d clear=%0d", n_first, n_repeat, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
