// folded_fir -- folded bit-plane FIR filter with changeable number and length of coefficients.
//
// The filter computes y(n) = sum_{i<k_c} c_i * x(n - (k_c-1-i)) with unsigned m_c-bit
// coefficients c_i and signed W_X-bit samples.  Written bit by bit, it is a chain of
// L = k_c*m_c operations, each adding one coefficient bit times a sample to a running
// partial sum.  Instead of one hardware row per operation, the chain is folded onto a fixed
// ring of K units: unit s executes the N = L/K operations p with p mod K = s, operation p in
// time slot p mod N.  Consecutive operations sit on consecutive units one slot apart, so the
// partial sum travels round the ring through one register per unit and a new output starts
// every N cycles.  Changing k_c or m_c only rewrites the units' folding-set tables
// (fs_assign); the ring itself never changes.  A configuration folds only when L is a
// multiple of K and gcd(K, N) = 1; others are rejected with cfg_err.
//
// Blocks: coef_mem (coefficients), fs_assign (folding-set assignment), sample_history
// (the samples the retimed operations read), K fold_unit nodes, a slot counter 0..N-1.
//
// Interface and timing:
//  * Coefficients: coef_we/coef_addr/coef_data, any time; used from the next configuration.
//  * Configuration: pulse cfg_start with cfg_kc, cfg_mc.  cfg_busy is high for 2L+2 cycles;
//    then running rises, or cfg_err is set and the filter stays stopped.  Starting a
//    configuration stops the filter and clears the sample history and the ring; cfg_start
//    is ignored while cfg_busy is high.
//  * Samples: in_ready is high in the last slot of each folding period, so one sample is taken
//    every N cycles.  If in_valid is low then, the whole array stalls until it comes.
//  * Output: out_valid pulses for one cycle with y(n), one cycle after x(n+skip) was taken,
//    where skip = K - k_c + 1 - min r >= 1 (see fs_assign); with an unstalled input stream
//    that is N*skip+1 cycles after x(n).  The last skip outputs of a stream leave only when
//    later samples push them out of the ring.  One output per input sample.
// The folding and retiming follow the folding scheme of the filter's description; the
// handshake, stall, start-up behaviour and sizes are this design's choices.
module folded_fir
  import ffir_pkg::*;
#(
  parameter int unsigned K      = K_DEF,       // units in the ring
  parameter int unsigned W_X    = W_X_DEF,     // sample width
  parameter int unsigned M_MAX  = M_MAX_DEF,   // largest coefficient length
  parameter int unsigned KC_MAX = KC_MAX_DEF,  // largest number of coefficients
  localparam int unsigned SW    = sum_width(W_X, M_MAX, KC_MAX),
  localparam int unsigned NSLOT = nslot_max(K, M_MAX, KC_MAX),
  localparam int unsigned HIST  = K + KC_MAX - 1,
  localparam int unsigned UW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SLW   = (NSLOT > 1) ? $clog2(NSLOT) : 1,
  localparam int unsigned NW    = $clog2(NSLOT + 1),
  localparam int unsigned KCW   = $clog2(KC_MAX + 1),
  localparam int unsigned MW    = $clog2(M_MAX + 1),
  localparam int unsigned CAW   = (KC_MAX > 1) ? $clog2(KC_MAX) : 1,
  localparam int unsigned SKW   = $clog2(K + KC_MAX + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // coefficient programming
  input  logic                  coef_we,
  input  logic [CAW-1:0]        coef_addr,
  input  logic [M_MAX-1:0]      coef_data,
  // configuration
  input  logic                  cfg_start,
  input  logic [KCW-1:0]        cfg_kc,
  input  logic [MW-1:0]         cfg_mc,
  output logic                  cfg_busy,
  output logic                  cfg_err,
  output logic                  running,
  output logic [NW-1:0]         fold_n,
  // samples
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [W_X-1:0] in_data,
  output logic                  out_valid,
  output logic signed [SW-1:0]  out_data
);
  // controller of the assignment
  logic [CAW-1:0]   coef_raddr;
  logic [M_MAX-1:0] coef_rdata;
  logic             tw_en;
  logic [UW-1:0]    tw_unit;
  logic [SLW-1:0]   tw_slot;
  fs_entry_t        tw_entry;
  logic             fa_busy, fa_done, fa_err;
  logic [SKW-1:0]   fa_skip;
  logic             starting;   // cfg_start seen, fs_assign not yet busy
  logic             cfg_go;     // cfg_start while no configuration is in progress

  // ring
  logic [SLW-1:0]   slot;
  logic [SKW-1:0]   skip_left;
  logic             clr;
  logic             en;
  logic             take;
  logic signed [W_X-1:0] hist [HIST];
  logic [SW-1:0]    sum_q [K];

  coef_mem #(.KC_MAX(KC_MAX), .M_MAX(M_MAX)) u_coef (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (coef_we),
    .waddr(coef_addr),
    .wdata(coef_data),
    .raddr(coef_raddr),
    .rdata(coef_rdata)
  );

  fs_assign #(.K(K), .M_MAX(M_MAX), .KC_MAX(KC_MAX)) u_assign (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (cfg_go),
    .kc        (cfg_kc),
    .mc        (cfg_mc),
    .coef_raddr(coef_raddr),
    .coef_rdata(coef_rdata),
    .tw_en     (tw_en),
    .tw_unit   (tw_unit),
    .tw_slot   (tw_slot),
    .tw_entry  (tw_entry),
    .busy      (fa_busy),
    .done      (fa_done),
    .err       (fa_err),
    .fold_n    (fold_n),
    .skip      (fa_skip)
  );

  always_comb begin
    cfg_busy = fa_busy || starting;
    cfg_go   = cfg_start && !cfg_busy;
    clr      = cfg_go;
    in_ready = running && (32'(slot) + 1 == 32'(fold_n));
    take     = in_ready && in_valid;
    // the array advances every cycle except a last slot without a sample
    en       = running && (!in_ready || in_valid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      starting  <= 1'b0;
      cfg_err   <= 1'b0;
      slot      <= '0;
      skip_left <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (cfg_go) begin
        running  <= 1'b0;
        starting <= 1'b1;
        cfg_err  <= 1'b0;
      end else if (fa_done) begin
        starting  <= 1'b0;
        cfg_err   <= fa_err;
        running   <= !fa_err;
        slot      <= SLW'(fold_n - NW'(1));   // wait for the first sample
        skip_left <= fa_skip;
      end else begin
        if (fa_busy) starting <= 1'b0;
        if (en) begin
          if (take) begin
            slot <= '0;
            // unit K-1 finishes operation L-1 in this cycle
            if (skip_left != 0) skip_left <= skip_left - SKW'(1);
            else                out_valid <= 1'b1;
          end else begin
            slot <= slot + SLW'(1);
          end
        end
      end
    end
  end

  assign out_data = signed'(sum_q[K-1]);

  sample_history #(.W_X(W_X), .HIST(HIST)) u_hist (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .en   (take),
    .din  (in_data),
    .hist (hist)
  );

  for (genvar s = 0; s < K; s++) begin : g_unit
    fold_unit #(.W_X(W_X), .SW(SW), .NSLOT(NSLOT), .HIST(HIST)) u_unit (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (en),
      .clr     (clr),
      .slot    (slot),
      .first   (s == 0 && slot == '0),
      .hist    (hist),
      .sum_in  (sum_q[(s + K - 1) % K]),
      .tw_en   (tw_en && 32'(tw_unit) == s),
      .tw_slot (tw_slot),
      .tw_entry(tw_entry),
      .sum_q   (sum_q[s])
    );
  end

  // the array only advances while configured, and samples are only taken when offered
  a_en_running: assert property (@(posedge clk) disable iff (!rst_n) en |-> running);
  a_take_last:  assert property (@(posedge clk) disable iff (!rst_n)
                                 take |-> (32'(slot) + 1 == 32'(fold_n)));
endmodule
