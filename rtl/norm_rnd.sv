// Normalize and round one mantissa product (helper of add_norm_round).
//
// The product of two N-bit mantissas in [1,2) lies in [1,4). The block gets
// the top N+2 bits of the 2N-bit product, p_top = P[2N-1 : N-2], and the
// sticky bit t_low = OR of P[N-3:0]. If P[2N-1] is set the product is shifted
// right by one (exponent +1). The N-bit mantissa is then rounded to nearest,
// ties to even, using the guard bit (first bit below the mantissa) and the
// sticky bit (OR of everything below the guard). If rounding carries out of
// the mantissa it becomes 2.0 and is renormalized to 1.0 (exponent +1 again).
// Output is the stored fraction (hidden bit dropped) and the exponent
// increment 0..2. Round to nearest even is this design's choice of the single
// rounding mode. Purely combinational.
module norm_rnd #(
  parameter int unsigned N = 53                  // mantissa width incl. hidden bit
) (
  input  logic [N+1:0] p_top,                    // P[2N-1 : N-2]
  input  logic         t_low,                    // OR of P[N-3:0]
  output logic [N-2:0] frac,                     // rounded fraction
  output logic [1:0]   inc,                      // exponent increment
  output logic         shifted,                  // product was in [2,4)
  output logic         rounded_up                // rounding added one ulp
);

  logic [N-1:0] mant;
  logic         g, st;
  logic [N:0]   mant_r;

  always_comb begin
    shifted = p_top[N+1];
    if (shifted) begin
      mant = p_top[N+1:2];
      g    = p_top[1];
      st   = p_top[0] | t_low;
    end else begin
      mant = p_top[N:1];
      g    = p_top[0];
      st   = t_low;
    end
    rounded_up = g & (st | mant[0]);
    mant_r     = {1'b0, mant} + {{N{1'b0}}, rounded_up};
    // on a carry-out mant_r is 2^N: the renormalized fraction is all zeros
    frac       = mant_r[N] ? '0 : mant_r[N-2:0];
    inc        = {1'b0, shifted} + {1'b0, mant_r[N]};
  end

endmodule
