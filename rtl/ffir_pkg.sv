// ffir_pkg -- types and default sizes shared by the folded bit-plane FIR filter.
//
// The filter folds the L = k_c*m_c bit-plane operations of a k_c-tap filter with m_c-bit
// coefficients onto a fixed ring of K operation units, N = L/K operations per unit.  Every
// unit keeps a folding-set table with one entry per time slot; fs_entry_t is that entry.
// The field widths are fixed here (bit weight up to 15, sample delay up to 63); modules
// that take size parameters check with assertions that their sizes fit these fields.
// None of the default sizes below is given by the filter's description; they are this
// design's choice.
package ffir_pkg;

  // Default sizes of the design.
  localparam int unsigned K_DEF      = 5;   // operation units in the ring (folding sets)
  localparam int unsigned W_X_DEF    = 8;   // input sample width, signed
  localparam int unsigned M_MAX_DEF  = 8;   // largest coefficient length m_c
  localparam int unsigned KC_MAX_DEF = 16;  // largest number of coefficients k_c

  localparam int unsigned J_W = 4;          // width of the bit-weight field
  localparam int unsigned D_W = 6;          // width of the sample-delay field

  // One operation p as seen by the unit that executes it.
  typedef struct packed {
    logic           cbit;  // coefficient bit c_i^j
    logic [J_W-1:0] j;     // weight 2^j of that bit
    logic [D_W-1:0] d;     // samples back from the newest: which x the operation uses
  } fs_entry_t;

  // Sum width that holds k_c products of a W_X-bit signed sample and an m-bit coefficient.
  function automatic int unsigned sum_width(int unsigned w_x, int unsigned m_max,
                                            int unsigned kc_max);
    return w_x + m_max + $clog2(kc_max);
  endfunction

  // Slots per unit needed for the longest filter.
  function automatic int unsigned nslot_max(int unsigned k, int unsigned m_max,
                                            int unsigned kc_max);
    return (kc_max * m_max + k - 1) / k;
  endfunction

  typedef enum logic [2:0] {
    FA_IDLE,    // waiting for start
    FA_CHECK,   // test L = k_c*m_c against the ring size
    FA_PASS1,   // walk p = 0..L-1, find the smallest retiming value
    FA_PASS2,   // walk p again, write every folding-set entry
    FA_DONE     // report result
  } fa_state_e;

endpackage
