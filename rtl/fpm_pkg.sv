// Shared constants of the single/double precision floating-point multiplier.
//
// The multiplier takes two 64-bit registers. In double mode each register holds
// one IEEE 754 double (sign bit 63, exponent bits 62..52, fraction bits 51..0).
// In single mode each register holds two IEEE 754 singles, the upper one in
// bits 63..32 and the lower one in bits 31..0, and the two products come back
// in the same places. These field positions follow the IEEE 754 formats.
//
// The packed mantissa layout (where each single mantissa sits inside the
// 53-bit multiplier operand) and the split point between the part of the
// carry-save product that is summarised by the carry net and sticky logic and
// the part that the final adder adds are this design's own choices.
package fpm_pkg;

  // IEEE 754 double precision
  localparam int unsigned DP_EW   = 11;           // exponent width
  localparam int unsigned DP_FW   = 52;           // stored fraction width
  localparam int unsigned DP_MW   = DP_FW + 1;    // mantissa with hidden bit (53)
  localparam int unsigned PW      = 2 * DP_MW;    // product width (106)

  // IEEE 754 single precision
  localparam int unsigned SP_EW   = 8;
  localparam int unsigned SP_FW   = 23;
  localparam int unsigned SP_MW   = SP_FW + 1;    // 24

  // Packed single-mode operand: lower single mantissa in bits 23..0, upper
  // single mantissa in bits 52..29, bits 28..24 zero. The lower product then
  // lands in product bits 47..0 and the upper product in bits 105..58.
  localparam int unsigned HI_LSB  = DP_MW - SP_MW;       // 29
  localparam int unsigned HI_PLSB = 2 * HI_LSB;          // 58

  // Product bits below SPLIT are only summarised (carry + sticky); bits from
  // SPLIT upwards are added by the final carry-propagate adder. SPLIT is the
  // lowest product bit that the lower single lane needs in full.
  localparam int unsigned SPLIT   = SP_MW - 2;           // 22

  // Operation mode, the control signal of the multiplier.
  typedef enum logic {
    MODE_SINGLE = 1'b0,   // two single-precision products
    MODE_DOUBLE = 1'b1    // one double-precision product
  } mode_e;

endpackage
