// tb_coef_mem -- coefficient store: reads zero after reset, returns what was written at
// every address, keeps words that are not written, and ignores data while we is low.
`timescale 1ns/1ps
module tb_coef_mem;
  localparam int unsigned KC_MAX = 16;
  localparam int unsigned M_MAX  = 8;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [M_MAX-1:0] wdata = '0, rdata;
  logic [M_MAX-1:0] model [KC_MAX];
  int checks = 0, failures = 0;

  coef_mem dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < KC_MAX; i++) begin
      raddr = 4'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL word %0d = %h, expected %h", i, rdata, model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < KC_MAX; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all();
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 4'($urandom);
      wdata = M_MAX'($urandom);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      if (t % 20 == 0) check_all();
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
