// vedic_pkg: types shared by the integrated (Sampoornam) Vedic multiplier.
//
// design_sel_e is the 3-bit code S2S1S0 that the logic block's 8:3
// priority encoder produces. The code values are the ones tabulated for the
// priority encoder of the integrated multiplier; the enum names are this
// design's own.
package vedic_pkg;

  typedef enum logic [2:0] {
    SEL_ZERO    = 3'b000,  // either operand is zero: product 0
    SEL_UT      = 3'b001,  // general case: Urdhva Tiryakbhyam multiplier
    SEL_NIKH_GG = 3'b010,  // both operands just above the base
    SEL_NIKH_SS = 3'b011,  // both operands just below the base
    SEL_NIKH_SG = 3'b100,  // larger operand above, smaller below the base
    SEL_SQUARE  = 3'b101,  // operands equal: squarer
    SEL_SHIFT_X = 3'b110,  // y equals the base: x shifted left
    SEL_SHIFT_Y = 3'b111   // x equals the base: y shifted left
  } design_sel_e;

endpackage
