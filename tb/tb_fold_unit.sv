// tb_fold_unit -- one node of the folded array at its default sizes.  A random folding-set
// table is written; then, slot by slot, with random samples and incoming sums, the
// registered result must equal (first ? 0 : sum_in) + (cbit ? x(d) * 2^j : 0) modulo 2^SW,
// with x(d) = hist[d] sign-extended, taken from the tb's own copy of the table.  The
// register must hold while en is low and clear on clr.
`timescale 1ns/1ps
module tb_fold_unit;
  import ffir_pkg::*;
  localparam int unsigned W_X = 8;
  localparam int unsigned SW = 20;
  localparam int unsigned NSLOT = 26;
  localparam int unsigned HIST = 20;
  localparam int unsigned SLW = $clog2(NSLOT);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0, first = 1'b0;
  logic [SLW-1:0] slot = '0;
  logic signed [W_X-1:0] hist [HIST];
  logic [SW-1:0] sum_in = '0, sum_q;
  logic tw_en = 1'b0;
  logic [SLW-1:0] tw_slot = '0;
  fs_entry_t tw_entry = '0;
  fs_entry_t model [NSLOT];
  int checks = 0, failures = 0;

  fold_unit dut (.clk, .rst_n, .en, .clr, .slot, .first, .hist, .sum_in, .tw_en, .tw_slot,
                 .tw_entry, .sum_q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(logic [SW-1:0] e, string what);
    checks++;
    if (sum_q !== e) begin
      failures++;
      $display("FAIL %s: sum_q = %h, expected %h", what, sum_q, e);
    end
  endtask

  initial begin
    logic [SW-1:0] e, held;
    for (int i = 0; i < HIST; i++) hist[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill the table
    for (int i = 0; i < NSLOT; i++) begin
      model[i].cbit = 1'($urandom);
      model[i].j    = J_W'($urandom_range(0, 7));
      model[i].d    = D_W'($urandom_range(0, HIST - 1));
      tw_en = 1'b1; tw_slot = SLW'(i); tw_entry = model[i];
      @(negedge clk);
    end
    tw_en = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      int sl;
      longint xv;
      sl = $urandom_range(0, NSLOT - 1);
      slot = SLW'(sl);
      first = ($urandom_range(0, 9) == 0);
      sum_in = SW'($urandom);
      for (int i = 0; i < HIST; i++) hist[i] = W_X'($urandom);
      en = 1'b1;
      xv = longint'(hist[model[sl].d]);
      e = first ? '0 : sum_in;
      if (model[sl].cbit) e = SW'(longint'(e) + (xv <<< model[sl].j));
      @(negedge clk);
      expect_q(e, $sformatf("slot %0d", sl));
      if (t % 50 == 0) begin
        held = sum_q;
        en = 1'b0;
        sum_in = ~sum_in;
        @(negedge clk);
        expect_q(held, "hold while en low");
      end
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    expect_q('0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
