// bp_row -- one row of basic cells: one operation of the bit-plane filter.
//
// The row adds the partial product (coefficient bit AND aligned sample) to the partial sum
// that enters it: s_out = s_in + (c_bit ? x_al : 0), modulo 2^SW.  Cell q takes bit q of
// both operands; carries ripple from cell 0 upwards and the carry out of the top cell is
// dropped, since SW is chosen wide enough for the full filter result.  The row is the
// operation named in the filter's description (partial product plus addition on one row of
// AND/full-adder cells); the ripple carry is this design's choice.  Combinational.
// The carry out of the top cell, carry[SW], is deliberately left unused.
module bp_row #(
  parameter int unsigned SW = 20  // sum width
) (
  input  logic [SW-1:0] s_in,   // incoming partial sum (two's complement)
  input  logic [SW-1:0] x_al,   // sample, sign-extended and shifted to the bit weight
  input  logic          c_bit,  // coefficient bit
  output logic [SW-1:0] s_out   // outgoing partial sum
);
  logic [SW:0] carry;

  assign carry[0] = 1'b0;

  for (genvar q = 0; q < SW; q++) begin : g_cell
    bp_basic_cell u_cell (
      .s_in (s_in[q]),
      .x_bit(x_al[q]),
      .c_bit(c_bit),
      .cin  (carry[q]),
      .s_out(s_out[q]),
      .cout (carry[q+1])
    );
  end
endmodule
