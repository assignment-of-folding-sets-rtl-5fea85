// sample_history -- shift register of the most recent input samples.
//
// After retiming the folded filter, the register delays that the unfolded filter has on its
// partial-sum path between coefficient groups sit on the sample inputs of the operations:
// operation p reads the sample d(p) steps back, d(p) being its normalised retiming value.
// This block keeps those samples.  On en, din enters at hist[0] and every sample moves one
// place older; clr empties the history (all zero), which is how the filter starts from rest.
// Timing: hist changes on the clock edge where en is high.  The depth HIST must exceed the
// largest delay an operation can need (K + KC_MAX - 1 is enough); it is this design's choice.
module sample_history #(
  parameter int unsigned W_X  = 8,   // sample width
  parameter int unsigned HIST = 20   // samples kept
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,   // synchronous clear, has priority over en
  input  logic                  en,    // shift in din
  input  logic signed [W_X-1:0] din,
  output logic signed [W_X-1:0] hist [HIST]  // hist[0] newest
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end else if (en) begin
      hist[0] <= din;
      for (int i = 1; i < HIST; i++) hist[i] <= hist[i-1];
    end
  end
endmodule
