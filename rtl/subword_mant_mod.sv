// Subword mantissa modifier with operand selection.
//
// Produces the two 53-bit operands of the mantissa multiplier for either mode.
// In single mode each 64-bit operand register carries two single-precision
// numbers, and both 24-bit single mantissas (hidden 1 restored) are packed
// into one 53-bit operand:
//
//   bit 52 ........ 29 | 28 .. 24 | 23 ........ 0
//     1.M(upper single) |  zeros   | 1.M(lower single)
//
// With the cross products switched off inside the multiplier, the 106-bit
// product then holds the lower single product in bits 47..0 and the upper
// single product in bits 105..58, with zeros between them. In double mode the
// operands are the double mantissas with their hidden 1. The choice is made
// by two mant_mux instances, one per operand.
//
// The packing places the two single-precision multiplication matrices inside
// the double-precision one, as the design prescribes; the exact bit offsets
// are this design's choice. Keeping the two operand multiplexers inside this
// block (rather than beside it) is also a choice of hierarchy only.
// Purely combinational.
module subword_mant_mod
  import fpm_pkg::*;
(
  input  mode_e            sw,     // operation mode
  input  logic [DP_FW-1:0] mx,     // fraction of X (double mode)
  input  logic [DP_FW-1:0] my,     // fraction of Y (double mode)
  input  logic [SP_FW-1:0] ma,     // fraction of A (upper single of X)
  input  logic [SP_FW-1:0] mb,     // fraction of B (upper single of Y)
  input  logic [SP_FW-1:0] mc,     // fraction of C (lower single of X)
  input  logic [SP_FW-1:0] md,     // fraction of D (lower single of Y)
  output logic [DP_MW-1:0] opx,    // multiplicand
  output logic [DP_MW-1:0] opy     // multiplier
);

  localparam int unsigned GAP = HI_LSB - SP_MW;   // 5 zero bits between lanes

  logic [DP_MW-1:0] msx, msy;                     // packed single-mode operands

  always_comb begin
    msx = {1'b1, ma, {GAP{1'b0}}, 1'b1, mc};
    msy = {1'b1, mb, {GAP{1'b0}}, 1'b1, md};
  end

  mant_mux u_mux_x (.sw(sw), .m_dbl({1'b1, mx}), .m_sgl(msx), .m(opx));
  mant_mux u_mux_y (.sw(sw), .m_dbl({1'b1, my}), .m_sgl(msy), .m(opy));

endmodule
