// Exponent updater.
//
// The sum of two biased exponents carries the bias twice; this block removes
// the extra bias, 2^(W-1)-1 (1023 for double, 127 for single). It also adds
// the normalization increment from the add/normalize/round unit: +1 when the
// mantissa product lies in [2,4) and +1 more when rounding carries out of the
// mantissa. Taking that increment here is this design's choice.
//
// The W+1 bit result is the biased product exponent modulo 2^(W+1). Two flags
// say whether it fits the W-bit exponent field of a normal number:
//   ovf : biased exponent >= 2^W - 1 (too large, the field is all ones)
//   unf : biased exponent <= 0       (too small for a normal number)
// Purely combinational.
module exp_update #(
  parameter int unsigned W = 11            // exponent width
) (
  input  logic [W:0]   sum,                // Ex + Ey from exp_adder
  input  logic [1:0]   inc,                // normalization increment, 0..2
  output logic [W:0]   e,                  // Ex + Ey - bias + inc, modulo 2^(W+1)
  output logic         ovf,
  output logic         unf
);

  localparam logic [W+1:0] BIAS    = (W+2)'((1 << (W-1)) - 1);
  localparam logic [W+1:0] EMAX_HI = (W+2)'((1 << W) - 1) + BIAS;  // biased result all ones

  logic [W+1:0] t;

  always_comb begin
    t   = {1'b0, sum} + {{W{1'b0}}, inc};
    e   = (W+1)'(t - BIAS);
    ovf = (t >= EMAX_HI);
    unf = (t <= BIAS);
  end

endmodule
