// Sticky-bit logic on carry-save vectors.
//
// Computes T = ((c + s) mod 2^K) != 0, the OR of the low product bits that
// rounding needs, without a carry-propagate addition. It uses the identity
//   c + s == 0 (mod 2^K)  <=>  (c ^ s) == ((c | s) << 1)   (K bits)
// which holds because a zero sum bit at every position forces the carry into
// position i+1 to be c(i) | s(i). Each bit position is then one XOR/XNOR and
// the result one K-input AND tree. The method is this design's choice.
// Purely combinational.
module sticky_cs #(
  parameter int unsigned K = 22                  // width of the summarised low part
) (
  input  logic [K-1:0] c,
  input  logic [K-1:0] s,
  output logic         t                         // 1 when the low sum is non-zero
);

  logic [K-1:0] zero_bit;

  always_comb begin
    zero_bit = ~((c ^ s) ^ ((c | s) << 1));
    t        = ~&zero_bit;
  end

endmodule
