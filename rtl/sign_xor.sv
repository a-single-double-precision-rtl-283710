// Sign unit: the sign of a product is the exclusive OR of the operand signs.
// One instance per product (one for double, one per single lane). Combinational.
module sign_xor (
  input  logic sa,      // sign of operand 1
  input  logic sb,      // sign of operand 2
  output logic sp       // sign of the product
);

  always_comb sp = sa ^ sb;

endmodule
