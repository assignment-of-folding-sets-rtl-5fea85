// tb_folded_fir -- end-to-end test of the folded bit-plane FIR filter at its default sizes.
//
// For a series of (k_c, m_c) configurations it programs random coefficients, configures
// the ring, streams random signed samples (sometimes with gaps, which stall the array) and
// compares every output with a direct convolution y(n) = sum_i c_i x(n-(k_c-1-i)) computed
// here.  It also checks: the folding factor N = k_c*m_c/K reported by the filter, one
// sample taken every N cycles, the number of start-up outputs suppressed (computed here
// from the retiming r(p) = floor(p/N) - floor(p/m_c) by brute force), the latency of an
// unstalled output, and that configurations that cannot fold are rejected.  Each mechanism
// (stall, reconfiguration, both kinds of rejection, N < m_c, N = m_c, N > m_c, a single
// unit slot N = 1, cfg_start while busy) is counted and must occur at least once.
`timescale 1ns/1ps
module tb_folded_fir;
  import ffir_pkg::*;

  localparam int unsigned K      = K_DEF;
  localparam int unsigned W_X    = W_X_DEF;
  localparam int unsigned M_MAX  = M_MAX_DEF;
  localparam int unsigned KC_MAX = KC_MAX_DEF;
  localparam int unsigned SW     = sum_width(W_X, M_MAX, KC_MAX);
  localparam int unsigned NSLOT  = nslot_max(K, M_MAX, KC_MAX);
  localparam int unsigned NW     = $clog2(NSLOT + 1);
  localparam int unsigned KCW    = $clog2(KC_MAX + 1);
  localparam int unsigned MW     = $clog2(M_MAX + 1);
  localparam int unsigned CAW    = $clog2(KC_MAX);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic coef_we = 1'b0;
  logic [CAW-1:0] coef_addr = '0;
  logic [M_MAX-1:0] coef_data = '0;
  logic cfg_start = 1'b0;
  logic [KCW-1:0] cfg_kc = '0;
  logic [MW-1:0] cfg_mc = '0;
  logic cfg_busy, cfg_err, running;
  logic [NW-1:0] fold_n;
  logic in_valid = 1'b0;
  logic in_ready;
  logic signed [W_X-1:0] in_data = '0;
  logic out_valid;
  logic signed [SW-1:0] out_data;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_stall = 0, n_reconf = 0, n_rej_len = 0, n_rej_gcd = 0;
  int n_n_lt_m = 0, n_n_eq_m = 0, n_n_gt_m = 0, n_n1 = 0, n_lat = 0, n_poke = 0;

  folded_fir dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data, .cfg_start, .cfg_kc, .cfg_mc,
    .cfg_busy, .cfg_err, .running, .fold_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int coef [KC_MAX];
  int kc_cur, mc_cur;
  int xs [$];
  longint take_cycle [$];
  int nout;
  longint last_take;
  int exp_skip;
  bit gap_seen;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic longint ref_y(int n);
    longint acc = 0;
    for (int i = 0; i < kc_cur; i++) begin
      int idx = n - (kc_cur - 1 - i);
      if (idx >= 0) acc += longint'(coef[i]) * longint'(xs[idx]);
    end
    return acc;
  endfunction

  // samples taken and the spacing between them
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      xs.push_back(int'(in_data));
      take_cycle.push_back(cycle);
      if (!gap_seen && xs.size() > 1)
        check(cycle - last_take == longint'(fold_n), "one sample every N cycles");
      last_take <= cycle;
      gap_seen = 0;
    end
    if (rst_n && running && in_ready && !in_valid) begin
      gap_seen = 1;
      n_stall++;
    end
  end

  // outputs against the convolution
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic longint e = ref_y(nout);
      check(longint'(out_data) == e, $sformatf("y(%0d) = %0d, expected %0d (kc=%0d mc=%0d)",
                                                nout, out_data, e, kc_cur, mc_cur));
      // latency of an unstalled stream: y(n) appears N*skip+1 cycles after x(n) was taken
      if (nout < take_cycle.size() && take_cycle.size() > nout + exp_skip &&
          take_cycle[nout + exp_skip] - take_cycle[nout] == longint'(exp_skip) * longint'(fold_n))
      begin
        check(cycle - take_cycle[nout] == longint'(exp_skip) * longint'(fold_n) + 1,
              "latency of an unstalled output");
        n_lat++;
      end
      nout++;
    end
  end

  task automatic write_coefs(int kc, int mc);
    for (int i = 0; i < KC_MAX; i++) begin
      coef[i] = (i < kc) ? int'($urandom_range(0, (1 << mc) - 1)) : 0;
      @(negedge clk);
      coef_we = 1'b1; coef_addr = CAW'(i); coef_data = M_MAX'(coef[i]);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // configure; returns 1 when accepted
  // with poke set, a second cfg_start (asking for an unfoldable 4 x 4) is given while the
  // first configuration is in progress; it must be ignored
  task automatic configure(int kc, int mc, output bit ok, input bit poke = 0);
    @(negedge clk);
    cfg_kc = KCW'(kc); cfg_mc = MW'(mc); cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    if (poke) begin
      repeat (2) @(negedge clk);
      check(cfg_busy, "busy during configuration");
      cfg_kc = KCW'(4); cfg_mc = MW'(4); cfg_start = 1'b1;
      @(negedge clk);
      cfg_start = 1'b0;
      n_poke++;
    end
    while (cfg_busy) @(negedge clk);
    ok = !cfg_err;
    kc_cur = kc; mc_cur = mc;
  endtask

  function automatic int skip_of(int kc, int mc);
    int n = kc * mc / int'(K);
    int rmin = 0;
    for (int p = 0; p < kc * mc; p++) begin
      int r = p / n - p / mc;
      if (r < rmin) rmin = r;
    end
    return int'(K) - kc + 1 - rmin;
  endfunction

  task automatic run_config(int kc, int mc, int nsamp, int gap_pct, bit poke = 0);
    bit ok;
    int n;
    write_coefs(kc, mc);
    configure(kc, mc, ok, poke);
    n = kc * mc / int'(K);
    check(ok, $sformatf("configuration kc=%0d mc=%0d accepted", kc, mc));
    check(int'(fold_n) == n, "folding factor N reported");
    if (!ok) return;
    n_reconf++;
    if (n < mc) n_n_lt_m++;
    if (n == mc) n_n_eq_m++;
    if (n > mc) n_n_gt_m++;
    if (n == 1) n_n1++;
    exp_skip = skip_of(kc, mc);
    xs.delete(); take_cycle.delete(); nout = 0; gap_seen = 1;
    // in_ready is stable at the falling edge: a sample offered there while in_ready is high
    // is taken at the next rising edge
    for (int s = 0; s < nsamp; s++) begin
      in_data = W_X'($urandom);
      forever begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 99) >= gap_pct);
        if (in_valid && in_ready) break;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3 * n + 4) @(negedge clk);
    check(nout == nsamp - exp_skip,
          $sformatf("outputs %0d, expected %0d (skip %0d)", nout, nsamp - exp_skip, exp_skip));
  endtask


  task automatic reject(int kc, int mc);
    bit ok;
    configure(kc, mc, ok);
    check(!ok, $sformatf("configuration kc=%0d mc=%0d rejected", kc, mc));
    check(!running, "stopped after rejection");
    if ((kc * mc) % int'(K) != 0) n_rej_len++;
    else n_rej_gcd++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_config(5, 8, 40, 0);    // N = m_c = 8
    run_config(4, 5, 30, 20);   // N = 4 < m_c
    run_config(10, 6, 30, 10);  // N = 12 > m_c
    reject(4, 4);               // L = 16, not a multiple of K
    reject(5, 5);               // N = 5, gcd(K, N) = 5
    run_config(3, 5, 30, 30);   // N = 3
    run_config(1, 5, 20, 0);    // N = 1
    reject(10, 5);              // N = 10, gcd 5
    run_config(15, 8, 40, 5);   // largest: L = 120, N = 24
    run_config(16, 5, 30, 0, 1); // N = 16 > m_c; a cfg_start during it is ignored
    run_config(2, 5, 20, 10);   // N = 2
    check(n_stall > 0, "stall happened");
    check(n_reconf > 1, "reconfiguration happened");
    check(n_rej_len > 0, "length rejection happened");
    check(n_rej_gcd > 0, "folding-set collision rejection happened");
    check(n_lat > 0, "latency measured");
    check(n_poke > 0, "cfg_start while busy happened");
    check(n_n_lt_m > 0 && n_n_eq_m > 0 && n_n_gt_m > 0 && n_n1 > 0, "all folding regimes ran");
    $display("latency checks=%0d", n_lat);
    $display("mechanisms: stall=%0d reconf=%0d rej_len=%0d rej_gcd=%0d N<m=%0d N=m=%0d N>m=%0d N=1=%0d poke=%0d",
             n_stall, n_reconf, n_rej_len, n_rej_gcd, n_n_lt_m, n_n_eq_m, n_n_gt_m, n_n1, n_poke);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
