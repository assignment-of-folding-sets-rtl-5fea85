// tb_sample_history -- the history must hold the last HIST samples, newest in hist[0],
// shift only on en, and become all zero on clr (which wins over en).
`timescale 1ns/1ps
module tb_sample_history;
  localparam int unsigned W_X = 8;
  localparam int unsigned HIST = 20;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic signed [W_X-1:0] din = '0;
  logic signed [W_X-1:0] hist [HIST];
  logic signed [W_X-1:0] model [$];
  int checks = 0, failures = 0;

  sample_history dut (.clk, .rst_n, .clr, .en, .din, .hist);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < HIST; i++) begin
      logic signed [W_X-1:0] e;
      e = (i < model.size()) ? model[i] : '0;
      checks++;
      if (hist[i] !== e) begin
        failures++;
        $display("FAIL hist[%0d] = %0d, expected %0d", i, hist[i], e);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    compare();
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      en  = 1'($urandom);
      clr = ($urandom_range(0, 99) < 3);
      din = W_X'($urandom);
      if (clr) model.delete();
      else if (en) model.push_front(din);
      @(negedge clk);
      en = 1'b0; clr = 1'b0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
