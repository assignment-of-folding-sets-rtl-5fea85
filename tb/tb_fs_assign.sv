// tb_fs_assign -- the folding-set assignment controller at its default sizes (K = 5).
// For each configuration the tb records every table write and compares it with the
// assignment worked out here with plain division: operation p goes to unit p mod K, slot
// p mod N, with coefficient bit c_i^j (i = p / m_c, j = m_c-1 - p mod m_c) and sample delay
// d = r(p) - min r, r(p) = p/N - p/m_c.  Every (unit, slot) of the L operations must be
// written exactly once; N and skip = K - k_c + 1 - min r are checked, as is the busy time
// of 2L+2 cycles.  Configurations with L not a multiple of K, with gcd(K, N) > 1, or with
// k_c or m_c zero or too large must be rejected.
`timescale 1ns/1ps
module tb_fs_assign;
  import ffir_pkg::*;
  localparam int unsigned K = 5;
  localparam int unsigned M_MAX = 8;
  localparam int unsigned KC_MAX = 16;
  localparam int unsigned NSLOT = nslot_max(K, M_MAX, KC_MAX);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [4:0] kc = '0;
  logic [3:0] mc = '0;
  logic [3:0] coef_raddr;
  logic [M_MAX-1:0] coef_rdata;
  logic tw_en;
  logic [2:0] tw_unit;
  logic [4:0] tw_slot;
  fs_entry_t tw_entry;
  logic busy, done, err;
  logic [4:0] fold_n;
  logic [5:0] skip;

  int coef [KC_MAX];
  fs_entry_t got [K][NSLOT];
  int nwr [K][NSLOT];
  int checks = 0, failures = 0;
  int busy_cycles;

  fs_assign dut (.clk, .rst_n, .start, .kc, .mc, .coef_raddr, .coef_rdata, .tw_en, .tw_unit,
                 .tw_slot, .tw_entry, .busy, .done, .err, .fold_n, .skip);

  assign coef_rdata = M_MAX'(coef[coef_raddr]);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (tw_en) begin
      got[tw_unit][tw_slot] <= tw_entry;
      nwr[tw_unit][tw_slot] <= nwr[tw_unit][tw_slot] + 1;
    end
    if (busy) busy_cycles <= busy_cycles + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int k_c, int m_c, bit expect_ok);
    int l, n, rmin, e_skip;
    for (int i = 0; i < KC_MAX; i++) coef[i] = int'($urandom_range(0, 255));
    for (int u = 0; u < K; u++)
      for (int s = 0; s < NSLOT; s++) nwr[u][s] = 0;
    busy_cycles = 0;
    @(negedge clk);
    kc = 5'(k_c); mc = 4'(m_c); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(err == !expect_ok, $sformatf("kc=%0d mc=%0d err=%0d", k_c, m_c, err));
    @(negedge clk);
    if (!expect_ok) return;
    l = k_c * m_c;
    n = l / int'(K);
    check(busy_cycles == 2 * l + 2, $sformatf("busy %0d cycles, expected %0d", busy_cycles, 2*l+2));
    check(int'(fold_n) == n, "fold_n");
    rmin = 0;
    for (int p = 0; p < l; p++) if (p / n - p / m_c < rmin) rmin = p / n - p / m_c;
    e_skip = int'(K) - k_c + 1 - rmin;
    check(int'(skip) == e_skip, $sformatf("skip %0d, expected %0d", skip, e_skip));
    for (int p = 0; p < l; p++) begin
      int u, s, i, j, d;
      u = p % int'(K); s = p % n; i = p / m_c; j = m_c - 1 - p % m_c;
      d = p / n - p / m_c - rmin;
      check(nwr[u][s] == 1, $sformatf("unit %0d slot %0d written %0d times", u, s, nwr[u][s]));
      check(got[u][s].cbit == 1'(coef[i] >> j) && int'(got[u][s].j) == j && int'(got[u][s].d) == d,
            $sformatf("kc=%0d mc=%0d p=%0d: entry %p, expected bit %0d j %0d d %0d",
                      k_c, m_c, p, got[u][s], 1'(coef[i] >> j), j, d));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(5, 8, 1);
    run(4, 5, 1);
    run(10, 6, 1);
    run(3, 5, 1);
    run(1, 5, 1);
    run(15, 8, 1);
    run(16, 5, 1);
    run(2, 5, 1);
    run(5, 1, 1);
    run(4, 4, 0);    // L = 16
    run(5, 5, 0);    // N = 5
    run(10, 5, 0);   // N = 10
    run(0, 5, 0);
    run(5, 0, 0);
    run(5, 9, 0);    // m_c > M_MAX
    run(20, 1, 0);   // k_c > KC_MAX
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
