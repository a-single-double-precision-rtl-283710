// Reference arithmetic for the multiplier testbenches.
//
// Independent of the RTL: rounding is computed from the exact integer product
// by comparing the discarded remainder with one half ulp, not from guard and
// sticky bits, and floating-point products are assembled field by field from
// wide integer arithmetic.
package fpm_ref_pkg;

  // Round an exact mantissa product p of two n-bit mantissas (value in
  // [2^(2n-2), 2^(2n))) to n bits, nearest even. Returns the stored fraction
  // (n-1 bits, right-aligned) and the exponent increment.
  function automatic void round_ref(input logic [127:0] p, input int n,
                                    output logic [127:0] frac, output int inc,
                                    output bit shifted, output bit up);
    int          sh;
    logic [127:0] mant, rem, half, one;
    one     = 128'd1;
    shifted = p[2*n-1];
    sh      = (n - 1) + (shifted ? 1 : 0);
    mant    = p >> sh;
    rem     = p & ((one << sh) - 1);
    half    = one << (sh - 1);
    up      = (rem > half) || (rem == half && mant[0]);
    mant    = mant + (up ? 1 : 0);
    inc     = shifted ? 1 : 0;
    if (mant == (one << n)) begin
      mant = one << (n - 1);
      inc  = inc + 1;
    end
    frac = mant & ((one << (n - 1)) - 1);
  endfunction

  // Product of two floating-point numbers with ew exponent bits and fw
  // fraction bits, operands taken as normal. Overflow gives infinity,
  // a too small exponent gives zero (no subnormals).
  function automatic logic [63:0] fmul_ref(input logic [63:0] a, input logic [63:0] b,
                                           input int ew, input int fw,
                                           output bit ovf, output bit unf,
                                           output bit shifted, output bit up);
    logic [127:0] ma, mb, frac, one;
    int           ea, eb, e, inc, bias, n;
    logic         sg;
    one  = 128'd1;
    n    = fw + 1;
    bias = (1 << (ew - 1)) - 1;
    sg   = a[ew+fw] ^ b[ew+fw];
    ea   = int'((a >> fw) & ((64'd1 << ew) - 1));
    eb   = int'((b >> fw) & ((64'd1 << ew) - 1));
    ma   = {64'd0, a & ((64'd1 << fw) - 1)} | (one << fw);
    mb   = {64'd0, b & ((64'd1 << fw) - 1)} | (one << fw);
    round_ref(ma * mb, n, frac, inc, shifted, up);
    e    = ea + eb - bias + inc;
    ovf  = (e >= (1 << ew) - 1);
    unf  = (e <= 0);
    if (ovf)      return (64'(sg) << (ew + fw)) | (((64'd1 << ew) - 1) << fw);
    else if (unf) return  64'(sg) << (ew + fw);
    else          return (64'(sg) << (ew + fw)) | (64'(e) << fw) | frac[63:0];
  endfunction

endpackage
