// Self-checking test of rmws_sched.
// Part 1 (8-bit port segment): the worked example - a register at BML 2
// against a bank whose newest pending request is at BML 4 scores 0x03.
// Part 2 (default size, 48 warps, 16 banks): random operand locations and
// eligibility; the chosen warp must have the smallest maximum shift distance
// (lowest warp number on ties), its score must be the thermometer code of
// that distance, and the per-bank BML must follow the issued reads.
//
// Timing: a 10-time-unit clock; stimulus changes just after a rising edge,
// combinational outputs are checked before the next edge and registered
// state after it.  A watchdog ends the run with a failure if it hangs.
module tb_rmws_sched;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------- part 1 ----------
  logic [1:0] e1;
  logic       v1 [2][2];
  logic       k1 [2][2];
  logic [2:0] m1 [2][2];
  logic       iv1, ack1;
  logic       iw1;
  logic [7:0] sc1;
  logic [2:0] bb1 [2];
  rmws_sched #(.NUM_WARPS(2), .NUM_BANKS(2), .SEG(8), .MAX_SRC(2)) u_small (
    .clk, .rst_n, .eligible(e1), .src_valid(v1), .src_bank(k1), .src_bml(m1),
    .issue_ack(ack1), .issue_valid(iv1), .issue_warp(iw1), .issue_score(sc1), .bank_bml(bb1));

  // ---------- part 2 ----------
  localparam int NW = 48, NB = 16, S = 16, MS = 3;
  logic [NW-1:0] el;
  logic       sv [NW][MS];
  logic [3:0] sb [NW][MS];
  logic [3:0] sm [NW][MS];
  logic       iv, ack;
  logic [5:0] iw;
  logic [15:0] sc;
  logic [3:0] bb [NB];
  rmws_sched u_full (.clk, .rst_n, .eligible(el), .src_valid(sv), .src_bank(sb),
    .src_bml(sm), .issue_ack(ack), .issue_valid(iv), .issue_warp(iw), .issue_score(sc),
    .bank_bml(bb));

  int ref_bml [NB];

  function automatic int absd(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (v1[i, j]) begin v1[i][j] = 0; k1[i][j] = 0; m1[i][j] = 0; end
    foreach (sv[i, j]) begin sv[i][j] = 0; sb[i][j] = 0; sm[i][j] = 0; end
    e1 = 0; ack1 = 0; el = 0; ack = 0;
    foreach (ref_bml[i]) ref_bml[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // part 1: put bank 0 at BML 4
    @(negedge clk);
    e1 = 2'b01; v1[0][0] = 1; k1[0][0] = 0; m1[0][0] = 3'd4; ack1 = 1;
    @(negedge clk);
    ack1 = 0;
    checks++;
    if (bb1[0] != 3'd4) failures++;
    m1[0][0] = 3'd2;                       // W0R0 at BML 2
    #1;
    checks++;
    if (!iv1 || iw1 != 0 || sc1 != 8'h03) begin
      failures++; $display("example score %h", sc1);
    end
    e1 = 2'b11; v1[1][0] = 1; k1[1][0] = 0; m1[1][0] = 3'd4;   // W1 at the port
    #1;
    checks++;
    if (!iv1 || iw1 != 1 || sc1 != 8'h00) failures++;

    // part 2
    for (int t = 0; t < 3000; t++) begin
      int best, bestd;
      @(negedge clk);
      for (int w = 0; w < NW; w++) begin
        el[w] = ($urandom_range(0, 3) != 0);
        for (int s = 0; s < MS; s++) begin
          sv[w][s] = ($urandom_range(0, 2) != 0);
          sb[w][s] = 4'($urandom_range(0, NB - 1));
          sm[w][s] = 4'($urandom_range(0, S - 1));
        end
      end
      ack = ($urandom_range(0, 3) != 0);
      #1;
      best = -1; bestd = 99;
      for (int w = 0; w < NW; w++) if (el[w]) begin
        int d;
        d = 0;
        for (int s = 0; s < MS; s++)
          if (sv[w][s] && absd(int'(sm[w][s]), ref_bml[sb[w][s]]) > d)
            d = absd(int'(sm[w][s]), ref_bml[sb[w][s]]);
        if (d < bestd) begin bestd = d; best = w; end
      end
      checks++;
      if (best < 0) begin
        if (iv) failures++;
      end else if (!iv || int'(iw) != best || sc != 16'((1 << bestd) - 1)) begin
        failures++;
        if (failures < 10) $display("t=%0d got w%0d score %h, expected w%0d d=%0d", t, iw, sc, best, bestd);
      end
      if (best >= 0 && ack)
        for (int s = 0; s < MS; s++)
          if (sv[best][s]) ref_bml[sb[best][s]] = int'(sm[best][s]);
      @(posedge clk);
      #1;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (int'(bb[b]) != ref_bml[b]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
