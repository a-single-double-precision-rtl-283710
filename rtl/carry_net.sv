// Carry network.
//
// The final adder only adds the upper part of the carry-save product; the
// lower K bits are never assembled. This block supplies the one thing the
// upper part needs from them: the carry out of c[K-1:0] + s[K-1:0]. Its
// internal structure is not prescribed; it is written as a K-bit add whose
// carry-out is kept, which synthesis turns into a carry-lookahead tree.
// Purely combinational.
module carry_net #(
  parameter int unsigned K = 22                  // width of the summarised low part
) (
  input  logic [K-1:0] c,                        // low bits of the carry vector
  input  logic [K-1:0] s,                        // low bits of the sum vector
  output logic         cout                      // carry into bit K
);

  logic [K:0] t;

  always_comb begin
    t    = {1'b0, c} + {1'b0, s};
    cout = t[K];
  end

endmodule
