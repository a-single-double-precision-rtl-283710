// Mantissa operand multiplexer.
//
// Passes the double-precision mantissa (hidden 1 restored) to the mantissa
// multiplier in double mode and the packed single-precision mantissas from the
// subword mantissa modifier in single mode. The multiplier uses two of these,
// one per operand, both switched by the mode signal. Combinational.
module mant_mux
  import fpm_pkg::*;
#(
  parameter int unsigned W = DP_MW                // operand width, 53
) (
  input  mode_e        sw,                        // operation mode
  input  logic [W-1:0] m_dbl,                     // double-precision mantissa
  input  logic [W-1:0] m_sgl,                     // packed single mantissas
  output logic [W-1:0] m                          // selected operand
);

  always_comb m = (sw == MODE_DOUBLE) ? m_dbl : m_sgl;

endmodule
