// Self-checking test of bml_calc.  Checks the worked example (two banks, two
// ports, 8-bit port segment, 8 registers per warp, offset 2: register 0 of
// warp 0 is at BML 2), that the mapping is one-to-one over all registers of
// all warps, that every bank holds ceil(total/banks) rows, and that the
// warp-register remapping keeps every warp inside its scheduler's banks.
//
// Timing: the block is combinational; each input set is applied, settled
// for one time unit and checked.  A watchdog ends the run with a failure
// if it hangs.
module tb_bml_calc;
  int checks = 0, failures = 0;

  // example configuration
  logic [5:0] w1, r1, n1;
  logic [2:0] o1, m1x;
  logic       b1, p1;
  bml_calc #(.NUM_BANKS(2), .PORTS(2), .SEG(8)) u_ex (
    .warp(w1), .regid(r1), .num_reg_warp(n1), .offset(o1), .bank(b1), .port(p1), .bml(m1x));

  // full-size configuration
  logic [5:0] w, r, n;
  logic [3:0] off, bml, bank;
  logic [1:0] port;
  bml_calc u_full (.warp(w), .regid(r), .num_reg_warp(n), .offset(off),
                   .bank(bank), .port(port), .bml(bml));

  // dual-scheduler warp-register remapping
  logic [3:0] bml2, bank2;
  logic [1:0] port2;
  bml_calc #(.NUM_SCHED(2)) u_dual (.warp(w), .regid(r), .num_reg_warp(n), .offset(off),
                   .bank(bank2), .port(port2), .bml(bml2));

  initial begin
    bit used [16][64];
    int rows [16];
    // worked example
    w1 = 0; r1 = 0; n1 = 8; o1 = 2;
    #1;
    checks++;
    if (b1 != 0 || p1 != 0 || m1x != 3'd2) begin
      failures++; $display("example W0R0: bank %0d port %0d bml %0d", b1, p1, m1x);
    end
    // configurations from the register-usage table: regs/thread, warps
    foreach (used[i, j]) used[i][j] = 0;
    for (int cfg = 0; cfg < 4; cfg++) begin
      int nr, nw, tot, per;
      case (cfg)
        0: begin nr = 20; nw = 48; end   // 60 entries / bank
        1: begin nr = 63; nw = 16; end   // 63 entries / bank
        2: begin nr = 15; nw = 32; end
        default: begin nr = 10; nw = 48; end
      endcase
      foreach (used[i, j]) used[i][j] = 0;
      foreach (rows[i]) rows[i] = 0;
      tot = nr * nw;
      per = (tot + 15) / 16;
      n = 6'(nr);
      off = 4'((16 - (per + 3) / 4) / 2);
      for (int ww = 0; ww < nw; ww++)
        for (int rr = 0; rr < nr; rr++) begin
          int row;
          w = 6'(ww); r = 6'(rr);
          #1;
          row = int'(port) * 16 + int'(bml);
          checks++;
          if (used[bank][row]) begin
            failures++; $display("collision cfg %0d w%0d r%0d", cfg, ww, rr);
          end
          used[bank][row] = 1;
          rows[bank]++;
          checks++;
          if (int'(bml) < int'(off) || int'(bml) >= int'(off) + (per + 3) / 4) failures++;
          // dual scheduler: bank group by warp parity
          checks++;
          if ((int'(bank2) / 8) != (ww % 2)) failures++;
        end
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (rows[b] > per) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
