// bp_basic_cell -- basic cell of the bit-plane array.
//
// An AND gate forms one partial-product bit, the coefficient bit times one sample bit, and a
// full adder adds it to the partial-sum bit coming into the cell and to the carry from the
// cell below.  This AND-plus-full-adder cell is the one the bit-plane architecture is built
// from; a row of these cells executes one filter operation.  Purely combinational.
module bp_basic_cell (
  input  logic s_in,   // incoming partial-sum bit
  input  logic x_bit,  // sample bit, already aligned to this cell's weight
  input  logic c_bit,  // coefficient bit of the operation
  input  logic cin,    // carry from the next lower cell
  output logic s_out,  // sum bit
  output logic cout    // carry to the next higher cell
);
  logic pp;

  always_comb begin
    pp    = x_bit & c_bit;
    s_out = s_in ^ pp ^ cin;
    cout  = (s_in & pp) | (s_in & cin) | (pp & cin);
  end
endmodule
