// Single/double precision floating-point multiplier.
//
// One double-precision multiplier datapath that, under a mode signal, either
// multiplies two IEEE 754 doubles or performs two independent
// single-precision multiplications in parallel:
//   MODE_DOUBLE : z = x * y                         (x, y, z doubles)
//   MODE_SINGLE : z[63:32] = x[63:32] * y[63:32]    (H = A * B)
//                 z[31:0]  = x[31:0]  * y[31:0]     (J = C * D)
//
// Structure (all combinational, one result per evaluation, no clock):
//   - three exponent adders (11-bit for double, two 8-bit for the singles) and
//     three exponent updaters that take out the extra bias;
//   - three sign XORs;
//   - the subword mantissa modifier packs the four single mantissas into two
//     53-bit operands, and its two multiplexers choose between them and the
//     double mantissas;
//   - the 53x53 carry-save multiplier switches off the partial products
//     outside the two single-precision squares in single mode, so the same
//     array yields both single products side by side;
//   - the carry network and sticky logic summarise the low 22 product bits;
//   - the add/normalize/round unit adds the rest and rounds each result.
// The datapath, the mode-dependent partial products, the packed register
// layout and the exponent adder widths follow the multiplier's published
// description. Choices of this design: mode value 1 selects double precision;
// rounding is to nearest, ties to even (one mode only); operands are taken as
// normal numbers (a hidden 1 is always assumed, zero, subnormal, infinity and
// NaN inputs are not recognised); the exponent updaters also add the
// normalization increment; a result exponent too large gives a signed
// infinity and one too small a signed zero, and the flags below report it.
//
// Flags: index 1 is the double result or the upper single H, index 0 the
// lower single J (always 0 in double mode).
module fp_sd_mul
  import fpm_pkg::*;
(
  input  mode_e       sw,                 // MODE_DOUBLE or MODE_SINGLE
  input  logic [63:0] x,                  // X, or A (63..32) and C (31..0)
  input  logic [63:0] y,                  // Y, or B (63..32) and D (31..0)
  output logic [63:0] z,                  // Z, or H (63..32) and J (31..0)
  output logic [1:0]  ovf,                // exponent overflow, result set to infinity
  output logic [1:0]  unf                 // exponent underflow, result set to zero
);

  // ---------------- exponents ----------------
  logic [DP_EW:0] esum_z, e_z;
  logic [SP_EW:0] esum_ab, esum_cd, e_ab, e_cd;
  logic [1:0]     inc_d, inc_h, inc_j;
  logic           ovf_d, unf_d, ovf_h, unf_h, ovf_j, unf_j;

  exp_adder #(.W(DP_EW)) u_eadd_z  (.ea(x[62:52]), .eb(y[62:52]), .sum(esum_z));
  exp_adder #(.W(SP_EW)) u_eadd_ab (.ea(x[62:55]), .eb(y[62:55]), .sum(esum_ab));
  exp_adder #(.W(SP_EW)) u_eadd_cd (.ea(x[30:23]), .eb(y[30:23]), .sum(esum_cd));

  exp_update #(.W(DP_EW)) u_eupd_z  (.sum(esum_z),  .inc(inc_d), .e(e_z),  .ovf(ovf_d), .unf(unf_d));
  exp_update #(.W(SP_EW)) u_eupd_ab (.sum(esum_ab), .inc(inc_h), .e(e_ab), .ovf(ovf_h), .unf(unf_h));
  exp_update #(.W(SP_EW)) u_eupd_cd (.sum(esum_cd), .inc(inc_j), .e(e_cd), .ovf(ovf_j), .unf(unf_j));

  // ---------------- signs ----------------
  // S_z and S_ab are the same operand bits; both XORs are kept as drawn.
  logic s_z, s_ab, s_cd;

  sign_xor u_sx_z  (.sa(x[63]), .sb(y[63]), .sp(s_z));
  sign_xor u_sx_ab (.sa(x[63]), .sb(y[63]), .sp(s_ab));
  sign_xor u_sx_cd (.sa(x[31]), .sb(y[31]), .sp(s_cd));

  // ---------------- mantissas ----------------
  logic [DP_MW-1:0] mx_op, my_op;
  logic [PW-1:0]    vc, vs;
  logic             cin, t;
  logic [DP_FW-1:0] frac_d;
  logic [SP_FW-1:0] frac_h, frac_j;
  logic [2:0]       shifted, rounded_up;

  subword_mant_mod u_smm (
    .sw(sw), .mx(x[51:0]), .my(y[51:0]),
    .ma(x[54:32]), .mb(y[54:32]), .mc(x[22:0]), .md(y[22:0]),
    .opx(mx_op), .opy(my_op)
  );

  cs_multiplier u_mul (.a(mx_op), .b(my_op), .sw(sw), .c(vc), .s(vs));

  carry_net #(.K(SPLIT)) u_cnet   (.c(vc[SPLIT-1:0]), .s(vs[SPLIT-1:0]), .cout(cin));
  sticky_cs #(.K(SPLIT)) u_sticky (.c(vc[SPLIT-1:0]), .s(vs[SPLIT-1:0]), .t(t));

  add_norm_round u_anr (
    .c_hi(vc[PW-1:SPLIT]), .s_hi(vs[PW-1:SPLIT]), .cin(cin), .t(t),
    .frac_d(frac_d), .inc_d(inc_d),
    .frac_h(frac_h), .inc_h(inc_h),
    .frac_j(frac_j), .inc_j(inc_j),
    .shifted(shifted), .rounded_up(rounded_up)
  );

  // ---------------- result packing ----------------
  function automatic logic [63:0] pack_d(logic sg, logic [DP_EW:0] e, logic [DP_FW-1:0] f,
                                         logic o, logic u);
    if (o)      return {sg, {DP_EW{1'b1}}, {DP_FW{1'b0}}};
    else if (u) return {sg, 63'd0};
    else        return {sg, e[DP_EW-1:0], f};
  endfunction

  function automatic logic [31:0] pack_s(logic sg, logic [SP_EW:0] e, logic [SP_FW-1:0] f,
                                         logic o, logic u);
    if (o)      return {sg, {SP_EW{1'b1}}, {SP_FW{1'b0}}};
    else if (u) return {sg, 31'd0};
    else        return {sg, e[SP_EW-1:0], f};
  endfunction

  always_comb begin
    if (sw == MODE_DOUBLE) begin
      z   = pack_d(s_z, e_z, frac_d, ovf_d, unf_d);
      ovf = {ovf_d, 1'b0};
      unf = {unf_d, 1'b0};
    end else begin
      z   = {pack_s(s_ab, e_ab, frac_h, ovf_h, unf_h), pack_s(s_cd, e_cd, frac_j, ovf_j, unf_j)};
      ovf = {ovf_h, ovf_j};
      unf = {unf_h, unf_j};
    end
  end

endmodule
