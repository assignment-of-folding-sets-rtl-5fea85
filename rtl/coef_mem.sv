// coef_mem -- programmable coefficient store.
//
// Holds KC_MAX coefficients of up to M_MAX bits, one word each, unsigned (bit j of word i is
// the coefficient bit c_i^j of weight 2^j).  The host writes a word with we/waddr/wdata on a
// clock edge; the folding-set assignment controller reads with raddr/rdata, asynchronously.
// A written coefficient takes effect at the next configuration, when the controller copies
// its bits into the units' folding-set tables.  Programmable coefficients are a property
// the filter's description names; the register-array organisation and the reset to zero are
// this design's choice.
module coef_mem #(
  parameter int unsigned KC_MAX = 16,  // coefficient words
  parameter int unsigned M_MAX  = 8    // bits per word
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [$clog2(KC_MAX)-1:0] waddr,
  input  logic [M_MAX-1:0]          wdata,
  input  logic [$clog2(KC_MAX)-1:0] raddr,
  output logic [M_MAX-1:0]          rdata
);
  logic [M_MAX-1:0] mem [KC_MAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < KC_MAX; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule
