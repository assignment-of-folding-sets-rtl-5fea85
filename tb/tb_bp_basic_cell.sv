// tb_bp_basic_cell -- exhaustive test of the AND + full-adder basic cell: all 16 input
// combinations, sum and carry compared with the arithmetic s_in + (x AND c) + cin.
`timescale 1ns/1ps
module tb_bp_basic_cell;
  logic s_in, x_bit, c_bit, cin, s_out, cout;
  int checks = 0, failures = 0;

  bp_basic_cell dut (.s_in, .x_bit, .c_bit, .cin, .s_out, .cout);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int total;
      {s_in, x_bit, c_bit, cin} = 4'(v);
      #1;
      total = int'(s_in) + int'(x_bit && c_bit) + int'(cin);
      checks++;
      if ({cout, s_out} != 2'(total)) begin
        failures++;
        $display("FAIL in=%b%b%b%b out=%b%b", s_in, x_bit, c_bit, cin, cout, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
