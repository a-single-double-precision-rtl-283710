// M-by-M mantissa multiplier with carry-save output and subword control.
//
// Partial-product generation follows the two rules of the design:
//   inside the two single-precision squares   p(i,j) = a(i) & b(j)
//   everywhere else (regions Z1, Z2, Z3)      p(i,j) = a(i) & (s & b(j))
// where the mode signal s is 1 in double mode and 0 in single mode. So in
// double mode all M*M bits are generated and the vectors sum to a*b; in single
// mode only the two squares remain and the vectors sum to
//   a[M-1:HI]*b[M-1:HI] << 2*HI  +  a[LO-1:0]*b[LO-1:0].
// The lower square covers operand bits LO-1..0, the upper square bits
// M-1..HI; operand bits between them (if any) belong to region Z3.
//
// The reduction method is not part of the design: any tree that reduces the
// matrix to a sum and a carry vector works. This one is a carry-save array,
// adding one partial-product row per 3:2 compressor stage. The output vectors
// are 2M bits wide and sum to the product modulo 2^(2M), which is exact since
// the product is below 2^(2M). Purely combinational.
module cs_multiplier
  import fpm_pkg::*;
#(
  parameter int unsigned M  = DP_MW,     // operand width, 53
  parameter int unsigned LO = SP_MW,     // width of the lower square, 24
  parameter int unsigned HI = HI_LSB     // lowest operand bit of the upper square, 29
) (
  input  logic [M-1:0]   a,              // multiplicand
  input  logic [M-1:0]   b,              // multiplier
  input  mode_e          sw,             // MODE_DOUBLE: all bits, MODE_SINGLE: squares only
  output logic [2*M-1:0] c,              // carry vector
  output logic [2*M-1:0] s               // sum vector
);

  localparam int unsigned PWL = 2 * M;

  logic              s_ctl;
  logic [M-1:0]      pp    [M];          // pp[i][j] = p(i,j), row i weighs 2^i
  logic [PWL-1:0]    row   [M];          // rows shifted into place
  logic [PWL-1:0]    acc_s [M];
  logic [PWL-1:0]    acc_c [M];

  always_comb s_ctl = (sw == MODE_DOUBLE);

  // partial products, Eqns of the two regions
  always_comb begin
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) begin
        if ((i < LO && j < LO) || (i >= HI && j >= HI))
          pp[i][j] = a[i] & b[j];
        else
          pp[i][j] = a[i] & (s_ctl & b[j]);
      end
      row[i] = PWL'({{M{1'b0}}, pp[i]}) << i;
    end
  end

  // carry-save array: acc_s + acc_c == sum of rows 0..k
  always_comb begin
    acc_s[0] = row[0];
    acc_c[0] = '0;
    for (int k = 1; k < M; k++) begin
      acc_s[k] = acc_s[k-1] ^ acc_c[k-1] ^ row[k];
      acc_c[k] = ((acc_s[k-1] & acc_c[k-1]) | (acc_s[k-1] & row[k]) |
                  (acc_c[k-1] & row[k])) << 1;
    end
    s = acc_s[M-1];
    c = acc_c[M-1];
  end

endmodule
