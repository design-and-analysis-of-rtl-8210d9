// amm_pkg: types shared by the additive-multiply-module (AMM) multiplier.
//
// fa_type_e selects the full-adder cell used in every ripple-carry adder of
// the multiplier. The four cells are the generic (behavioural) adder and the
// three pass-logic style adders built from XOR/XNOR gates and 2:1 muxes.
// The encoding is this design's own; its values also index the four
// multipliers placed side by side in amm_mult_top.
package amm_pkg;

  typedef enum logic [1:0] {
    FA_GENERIC      = 2'd0,
    FA_XOR_MUX      = 2'd1,
    FA_XNOR_MUX     = 2'd2,
    FA_XOR_XNOR_MUX = 2'd3
  } fa_type_e;

  localparam int unsigned NUM_FA_TYPES = 4;

endpackage
