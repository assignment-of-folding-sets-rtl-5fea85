// fs_assign -- folding-set assignment controller.
//
// The filter has L = k_c*m_c operations p = 0..L-1: operation p adds coefficient bit c_i^j
// (i = p div m_c, j = m_c-1 - p mod m_c, most significant bit first) times a sample to the
// running partial sum, and a register delay separates coefficient groups.  They are folded
// onto K units, N = L/K operations each, with the assignment
//     folding set (unit)  s = p mod K,      time slot  p mod N.
// Operation p+1 therefore always runs one unit further round the ring and one slot later,
// so after retiming every folded delay is one register.  The retiming that makes every
// folding delay non-negative is
//     r(p) = floor(p/N) - floor(p/m_c),
// and it ends up on the sample inputs: operation p reads the sample d(p) = r(p) - min r
// steps back.  The controller computes all of this with counters (no division by a
// variable) and writes each operation into the folding-set table of its unit.
//
// Sequence after start (kc, mc sampled): CHECK (1 cycle) rejects k_c or m_c of zero or too
// large, and L not a multiple of K; PASS1 walks p = 0..L-1 to find min r; PASS2 walks p
// again and writes one table entry per cycle (tw_en, tw_unit, tw_slot, tw_entry), reading
// coefficient i through coef_raddr/coef_rdata.  If two operations land on the same unit and
// slot -- which happens exactly when gcd(K, N) > 1, so the assignment is not one-to-one --
// the configuration is rejected.  DONE raises done for one cycle, with err, fold_n = N and
// skip valid: the number of outputs after a restart that belong to samples before the first one.
// busy is high from the cycle after start to the DONE cycle: 2L+2 cycles, or 2 when the
// check fails.  The assignment equations and the retiming are those of the folding
// scheme; the collision check and the two-pass sequencing are this design's choices.
module fs_assign
  import ffir_pkg::*;
#(
  parameter int unsigned K      = K_DEF,       // units in the ring
  parameter int unsigned M_MAX  = M_MAX_DEF,   // largest m_c
  parameter int unsigned KC_MAX = KC_MAX_DEF,  // largest k_c
  localparam int unsigned NSLOT = nslot_max(K, M_MAX, KC_MAX),
  localparam int unsigned UW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SLW   = (NSLOT > 1) ? $clog2(NSLOT) : 1,
  localparam int unsigned NW    = $clog2(NSLOT + 1),
  localparam int unsigned KCW   = $clog2(KC_MAX + 1),
  localparam int unsigned MW    = $clog2(M_MAX + 1),
  localparam int unsigned CAW   = (KC_MAX > 1) ? $clog2(KC_MAX) : 1,
  localparam int unsigned MIW   = (M_MAX > 1) ? $clog2(M_MAX) : 1,
  localparam int unsigned LW    = $clog2(KC_MAX * M_MAX + 1),
  localparam int unsigned SKW   = $clog2(K + KC_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [KCW-1:0]   kc,
  input  logic [MW-1:0]    mc,
  output logic [CAW-1:0]   coef_raddr,
  input  logic [M_MAX-1:0] coef_rdata,
  output logic             tw_en,
  output logic [UW-1:0]    tw_unit,
  output logic [SLW-1:0]   tw_slot,
  output fs_entry_t        tw_entry,
  output logic             busy,
  output logic             done,
  output logic             err,
  output logic [NW-1:0]    fold_n,
  output logic [SKW-1:0]   skip
);
  localparam int unsigned RW = $clog2(K + KC_MAX) + 2;  // signed retiming value

  fa_state_e state;
  logic [KCW-1:0]  kc_q;
  logic [MW-1:0]   mc_q;
  logic [LW-1:0]   l_q;        // L
  logic [LW-1:0]   p;          // operation index
  logic [UW-1:0]   pk;         // p mod K
  logic [SLW-1:0]  pn;         // p mod N
  logic [UW:0]     qn;         // floor(p/N) < K
  logic [MW-1:0]   pm;         // p mod m_c
  logic [CAW-1:0]  ci;         // floor(p/m_c)
  logic signed [RW-1:0] r_p, rmin;
  logic [NSLOT-1:0] used [K];  // entries written in PASS2
  logic [LW-1:0]   l_prod;
  logic [MW-1:0]   jbit;
  logic            collide;

  always_comb begin
    l_prod   = LW'(kc * mc);
    r_p      = RW'(signed'({1'b0, qn})) - RW'(signed'({1'b0, ci}));
    jbit     = mc_q - MW'(1) - pm;
    collide  = used[pk][pn];
    coef_raddr = ci;
    busy     = (state != FA_IDLE);
    done     = (state == FA_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= FA_IDLE;
      kc_q     <= '0;
      mc_q     <= '0;
      l_q      <= '0;
      p        <= '0;
      pk       <= '0;
      pn       <= '0;
      qn       <= '0;
      pm       <= '0;
      ci       <= '0;
      rmin     <= '0;
      fold_n   <= '0;
      skip     <= '0;
      err      <= 1'b0;
      tw_en    <= 1'b0;
      tw_unit  <= '0;
      tw_slot  <= '0;
      tw_entry <= '0;
      for (int u = 0; u < K; u++) used[u] <= '0;
    end else begin
      tw_en <= 1'b0;
      unique case (state)
        FA_IDLE: begin
          if (start) begin
            kc_q  <= kc;
            mc_q  <= mc;
            l_q   <= l_prod;
            err   <= 1'b0;
            state <= FA_CHECK;
          end
        end
        FA_CHECK: begin
          if (kc_q == 0 || mc_q == 0 || 32'(kc_q) > KC_MAX || 32'(mc_q) > M_MAX ||
              32'(mc_q) > 2**J_W || (32'(l_q) % K) != 0) begin
            err   <= 1'b1;
            state <= FA_DONE;
          end else begin
            fold_n <= NW'(32'(l_q) / K);
            rmin   <= '0;
            {p, pk, pn, qn, pm, ci} <= '0;
            for (int u = 0; u < K; u++) used[u] <= '0;
            state  <= FA_PASS1;
          end
        end
        FA_PASS1, FA_PASS2: begin
          if (state == FA_PASS1) begin
            if (r_p < rmin) rmin <= r_p;
          end else begin
            tw_en         <= 1'b1;
            tw_unit       <= pk;
            tw_slot       <= pn;
            tw_entry.cbit <= coef_rdata[MIW'(jbit)];
            tw_entry.j    <= J_W'(jbit);
            tw_entry.d    <= D_W'(r_p - rmin);
            used[pk][pn]  <= 1'b1;
            if (collide) err <= 1'b1;
          end
          // advance the counters of p
          if (p == l_q - LW'(1)) begin
            {p, pk, pn, qn, pm, ci} <= '0;
            if (state == FA_PASS1) begin
              state <= FA_PASS2;
            end else begin
              skip  <= SKW'(signed'(RW'(K)) - signed'(RW'(kc_q)) + RW'(1) - rmin);
              state <= FA_DONE;
            end
          end else begin
            p  <= p + LW'(1);
            pk <= (32'(pk) == K - 1) ? '0 : pk + UW'(1);
            if (32'(pn) + 1 == 32'(fold_n)) begin
              pn <= '0;
              qn <= qn + 1'b1;
            end else begin
              pn <= pn + SLW'(1);
            end
            if (pm == mc_q - MW'(1)) begin
              pm <= '0;
              ci <= ci + CAW'(1);
            end else begin
              pm <= pm + MW'(1);
            end
          end
        end
        FA_DONE: begin
          state <= FA_IDLE;
        end
        default: state <= FA_IDLE;
      endcase
    end
  end
endmodule
