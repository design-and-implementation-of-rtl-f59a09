// mult_pkg: types shared by the multiplier blocks.
//
// recode_scheme_e names the six radix-4 recoding schemes that the recoder
// (r4_recoder), the partial-product row generator (r4_ppg) and the recoded
// multiplier (r4_recoded_mult) can be built for. NEW_THREE_SIGNAL_1 is the
// proposed scheme: the simple THREE_SIGNAL_1 PP generator with a recoder that
// forces a clean zero for the digit pattern 111.
//
// recode_ctl_t bundles the control signals one recoder cell drives into one
// PP row. A scheme uses only the fields it defines (for example pos exists
// only in THREE_SIGNAL_3); the others are driven to 0.
//
// booth_sel_t is the select bundle of the modified Booth encoder of the 8x8
// Booth multiplier: m_n and m2_n are active low (select A and 2A), m3 is the
// active high sign select.
package mult_pkg;

  typedef enum logic [2:0] {
    THREE_SIGNAL_1     = 3'd0,
    THREE_SIGNAL_2     = 3'd1,
    THREE_SIGNAL_3     = 3'd2,
    FOUR_SIGNAL_1      = 3'd3,
    SERIES_SIGNAL_1    = 3'd4,
    NEW_THREE_SIGNAL_1 = 3'd5
  } recode_scheme_e;

  localparam int unsigned NUM_SCHEMES = 6;

  typedef struct packed {
    logic neg;   // negate the multiple
    logic one;   // select 1 x multiplicand
    logic two;   // select 2 x multiplicand
    logic zero;  // force the row to zero
    logic pos;   // positive, non-zero digit (THREE_SIGNAL_3 only)
    logic cor;   // +1 correction bit added at the row's LSB
  } recode_ctl_t;

  typedef struct packed {
    logic m_n;   // active low: row = +/- A
    logic m2_n;  // active low: row = +/- 2A
    logic m3;    // active high: negative digit
  } booth_sel_t;

endpackage
