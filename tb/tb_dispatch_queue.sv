// Self-checking test of dispatch_queue: for random grid sizes, SM counts and
// strides, every SM's queue is launched and drained; the blocks handed out
// must be consecutive, every block of the grid must be handed out exactly
// once over all SMs, each SM gets at most stride * ceil(batches / n_sm)
// blocks and starts on a batch boundary (no batch is split between SMs),
// batch_id = tb_id / stride, and empty rises exactly when the run ends.
//
// Timing: a 10-time-unit clock; stimulus changes just after a rising edge,
// combinational outputs are checked before the next edge and registered
// state after it.  A watchdog ends the run with a failure if it hangs.
module tb_dispatch_queue;
  localparam int ID_W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic launch = 0, pop = 0, empty;
  logic [ID_W-1:0] n_tb = 0, stride = 1, tb_id, batch_id, head, tail;
  logic [7:0] n_sm = 1, sm_id = 0;
  bit seen [int];

  dispatch_queue #(.ID_W(ID_W)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int g = 0; g < 60; g++) begin
      int share, total;
      n_tb   = ID_W'($urandom_range(1, 700));
      n_sm   = 8'($urandom_range(1, 15));
      stride = ID_W'($urandom_range(1, 12));
      if (g == 0) begin n_tb = 3; n_sm = 8; end     // fewer blocks than SMs
      share  = ((int'(n_tb) + int'(stride) - 1) / int'(stride) + int'(n_sm) - 1) / int'(n_sm) * int'(stride);
      seen.delete();
      total = 0;
      for (int s = 0; s < int'(n_sm); s++) begin
        int got, prev;
        sm_id = 8'(s);
        launch = 1;
        @(negedge clk);
        launch = 0;
        got = 0; prev = -1;
        while (!empty) begin
          chk(prev < 0 || int'(tb_id) == prev + 1, "not consecutive");
          chk(prev >= 0 || int'(tb_id) % int'(stride) == 0, "run does not start on a batch boundary");
          chk(!seen.exists(int'(tb_id)), "block handed out twice");
          chk(int'(batch_id) == int'(tb_id) / int'(stride), "batch id");
          seen[int'(tb_id)] = 1;
          prev = int'(tb_id);
          got++;
          pop = $urandom_range(0, 1);
          if (pop) begin @(negedge clk); pop = 0; end
          else begin
            @(negedge clk);
            chk(int'(tb_id) == prev, "head moved without pop");
            pop = 1; @(negedge clk); pop = 0;
          end
        end
        chk(got <= share, "share exceeded");
        total += got;
      end
      chk(total == int'(n_tb), "grid not covered");
      chk(seen.num() == int'(n_tb), "grid not covered (ids)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
