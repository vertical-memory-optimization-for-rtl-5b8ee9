// Self-checking test of iwl at the described size (48 warps, 10-bit
// counters, 256-block L1, beta = 4, alpha = 0.1, 15 SMs).
//
// A directed part replays a worked case: a grid of 150 CTAs of 256 threads
// gives N_pred = ceil(0.1*150*256/(32*15)) = 8; after 8 finished warps with
// 20 first-time misses and 80 accesses each, WS = 20, RRDegr = 4 and
// N_act = ceil(4*256/80) = 13, sampling has ended and the AMT clear pulse
// has been given.  A random part then drives accesses, first and repeated
// misses and warp completions and compares every output each cycle with a
// reference model of the counters and running averages.
module tb_iwl;
  localparam int NW = 48, FRAC = 4, FX_W = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic launch = 0, acc_valid = 0, miss_valid = 0, miss_first = 0, done_valid = 0;
  logic [15:0] cfg_n_cta = 0;
  logic [10:0] cfg_cta_size = 0;
  logic [5:0] acc_warp = 0, miss_warp = 0, done_warp = 0;
  logic sampling, amt_clear;
  logic [15:0] n_pred;
  logic [FX_W-1:0] ws, rrd;
  logic [6:0] n_act;
  // model
  int m_miss [NW], m_acc [NW];
  int m_done = 0, m_period = 0, m_ws = 0, m_rrd = 0;
  bit m_have = 0, m_clear = 0;
  int n_clear = 0, n_throttle = 0;

  iwl dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  function automatic int ceil_div(longint a, longint b);
    return int'((a + b - 1) / b);
  endfunction

  function automatic int m_npred();
    int v;
    v = ceil_div(longint'(cfg_n_cta) * cfg_cta_size, 10 * 32 * 15);
    return v == 0 ? 1 : v;
  endfunction

  function automatic int m_nact();
    longint prod, q;
    prod = longint'(m_ws) * m_rrd;
    q = (prod == 0) ? NW : (longint'(4 * 256) * 256 + prod - 1) / prod;
    if (m_done < m_npred() || !m_have || q > NW) q = NW;
    if (q == 0) q = 1;
    return int'(q);
  endfunction

  task automatic do_launch(input int ncta, input int size);
    cfg_n_cta = 16'(ncta); cfg_cta_size = 11'(size);
    launch = 1;
    @(negedge clk);
    launch = 0;
    foreach (m_miss[w]) begin m_miss[w] = 0; m_acc[w] = 0; end
    m_done = 0; m_period = 0; m_ws = 0; m_rrd = 0; m_have = 0; m_clear = 1;
  endtask

  // one clock of the model, given the inputs now applied
  task automatic step();
    int m, a, wsn, rrn;
    #1;
    chk(int'(n_pred) == m_npred(), "n_pred");
    chk(sampling == (m_done < m_npred()), "sampling");
    chk(int'(ws) == m_ws && int'(rrd) == m_rrd, "averages");
    chk(int'(n_act) == m_nact(), "n_act");
    chk(amt_clear == m_clear, "amt_clear");
    if (m_nact() < NW) n_throttle++;
    if (amt_clear) n_clear++;
    m_clear = 0;
    m = (m_miss[done_warp] == 0) ? 1 : m_miss[done_warp];
    a = m_acc[done_warp];
    wsn = (m << FRAC) & 16'h3fff;
    rrn = ((a << FRAC) / m) & 16'h3fff;
    if (acc_valid && m_acc[acc_warp] != 1023) m_acc[acc_warp]++;
    if (miss_valid && miss_first && m_miss[miss_warp] != 1023) m_miss[miss_warp]++;
    if (done_valid) begin
      m_miss[done_warp] = 0; m_acc[done_warp] = 0;
      if (!m_have) begin m_ws = wsn; m_rrd = rrn; end
      else begin m_ws = (m_ws + wsn) >> 1; m_rrd = (m_rrd + rrn) >> 1; end
      m_have = 1;
      if (m_done != 65535) m_done++;
      if (m_period + 1 >= m_npred()) begin m_period = 0; m_clear = 1; end
      else m_period++;
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_miss[w]) begin m_miss[w] = 0; m_acc[w] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // directed worked case
    do_launch(150, 256);
    chk(int'(n_pred) == 8, "worked N_pred = 8");
    for (int w = 0; w < 8; w++) begin
      for (int i = 0; i < 80; i++) begin
        acc_valid = 1; acc_warp = 6'(w);
        miss_valid = (i < 20); miss_warp = 6'(w); miss_first = 1;
        step();
      end
      acc_valid = 0; miss_valid = 0;
      done_valid = 1; done_warp = 6'(w);
      step();
      done_valid = 0;
    end
    step();
    chk(!sampling, "worked: sampling over");
    chk(int'(ws) == 20 << FRAC && int'(rrd) == 4 << FRAC, "worked: WS 20, RRDegr 4");
    chk(int'(n_act) == 13, "worked: N_act 13");
    // random
    for (int g = 0; g < 4; g++) begin
      do_launch($urandom_range(1, 400), 32 * $urandom_range(1, 32));
      for (int i = 0; i < 20000; i++) begin
        acc_valid  = $urandom_range(0, 1);
        acc_warp   = 6'($urandom_range(0, NW - 1));
        miss_valid = acc_valid && $urandom_range(0, 3) == 0;
        miss_warp  = acc_warp;
        miss_first = $urandom_range(0, 2) != 0;
        done_valid = $urandom_range(0, 150) == 0;
        done_warp  = 6'($urandom_range(0, NW - 1));
        step();
      end
    end
    acc_valid = 0; miss_valid = 0; done_valid = 0;
    $display("amt_clear=%0d throttled_cycles=%0d", n_clear, n_throttle);
    checks += 2;
    if (n_clear < 2) failures++;
    if (n_throttle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
