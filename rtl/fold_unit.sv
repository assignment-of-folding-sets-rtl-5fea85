// fold_unit -- one hardware node of the folded bit-plane array.
//
// A node executes, in each time slot, whichever operation of its folding set the slot holds.
// The folding set is a table of NSLOT entries (ffir_pkg::fs_entry_t), one per slot: the
// coefficient bit c_i^j, the bit weight j, and the delay d of the sample the operation uses.
// In a slot the node reads entry[slot], takes hist[d], sign-extends it to SW bits and shifts
// it left by j, and lets a row of basic cells (bp_row) add it, gated by the coefficient bit,
// to the partial sum arriving from the previous node.  When first is high (operation p = 0,
// the start of a new output sample) the incoming sum is replaced by zero.  The result is
// registered in sum_q, which feeds the next node of the ring one cycle later.
//
// Because any entry can hold any operation, a node can execute any operation of the filter:
// this is what lets the number of coefficients and their length change without changing the
// array.  The table, the row and the one-register node delay follow the folding scheme; the
// barrel shift that aligns the sample to the bit weight is this design's own choice.
// Timing: combinational from slot/hist/sum_in to the row; sum_q updates on en.  The table
// is written one entry per cycle through tw_*, normally only while the filter is stopped.
module fold_unit
  import ffir_pkg::*;
#(
  parameter int unsigned W_X   = W_X_DEF,                                 // sample width
  parameter int unsigned SW    = sum_width(W_X_DEF, M_MAX_DEF, KC_MAX_DEF), // partial-sum width
  parameter int unsigned NSLOT = nslot_max(K_DEF, M_MAX_DEF, KC_MAX_DEF),   // table entries
  parameter int unsigned HIST  = K_DEF + KC_MAX_DEF - 1                     // samples kept
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,       // advance one time slot
  input  logic                        clr,      // clear sum_q
  input  logic [$clog2(NSLOT)-1:0]    slot,     // current time slot
  input  logic                        first,    // this slot executes p = 0
  input  logic signed [W_X-1:0]       hist [HIST],
  input  logic [SW-1:0]               sum_in,   // from the previous node's sum_q
  input  logic                        tw_en,
  input  logic [$clog2(NSLOT)-1:0]    tw_slot,
  input  fs_entry_t                   tw_entry,
  output logic [SW-1:0]               sum_q
);
  fs_entry_t            table_q [NSLOT];
  fs_entry_t            ent;
  logic signed [W_X-1:0] x_sel;
  logic [SW-1:0]        x_ext;
  logic [SW-1:0]        x_al;
  logic [SW-1:0]        s_in;
  logic [SW-1:0]        s_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSLOT; i++) table_q[i] <= '0;
    end else if (tw_en) begin
      table_q[tw_slot] <= tw_entry;
    end
  end

  always_comb begin
    ent   = table_q[slot];
    x_sel = '0;
    for (int i = 0; i < HIST; i++) begin
      if (32'(ent.d) == i) x_sel = hist[i];
    end
    x_ext = SW'(x_sel);                 // sign extension
    x_al  = x_ext << ent.j;
    s_in  = first ? '0 : sum_in;
  end

  bp_row #(.SW(SW)) u_row (
    .s_in (s_in),
    .x_al (x_al),
    .c_bit(ent.cbit),
    .s_out(s_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sum_q <= '0;
    else if (clr)  sum_q <= '0;
    else if (en)   sum_q <= s_out;
  end

  initial begin
    assert (HIST <= 2**D_W) else $error("fold_unit: HIST exceeds the delay field");
  end
endmodule
