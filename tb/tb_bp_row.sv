// tb_bp_row -- random test of one row of basic cells at its default width: the row must add
// the sample to the incoming sum when the coefficient bit is one and pass the sum unchanged
// when it is zero, modulo 2^SW.  Includes the carry-chain corner cases (all ones + 1).
`timescale 1ns/1ps
module tb_bp_row;
  localparam int unsigned SW = 20;
  logic [SW-1:0] s_in, x_al, s_out;
  logic c_bit;
  int checks = 0, failures = 0;

  bp_row dut (.s_in, .x_al, .c_bit, .s_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [SW-1:0] a, logic [SW-1:0] b, logic c);
    logic [SW-1:0] e;
    s_in = a; x_al = b; c_bit = c;
    #1;
    e = c ? SW'(longint'(a) + longint'(b)) : a;
    checks++;
    if (s_out !== e) begin
      failures++;
      $display("FAIL %h + (%b ? %h) = %h, expected %h", a, c, b, s_out, e);
    end
  endtask

  initial begin
    apply('1, SW'(1), 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('0, '0, 1'b1);
    for (int t = 0; t < 2000; t++) apply(SW'($urandom), SW'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
