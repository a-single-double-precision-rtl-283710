// Add, normalize and round unit.
//
// Turns the carry-save product of the mantissa multiplier into rounded
// fractions. It adds the upper part of the two vectors, bits PW-1..SPLIT
// (105..22), with the carry from the carry network as carry-in, which gives
// the exact product bits P[105:22]. Bits below SPLIT are known only through
// the carry network and the sticky bit T.
//
// From P it rounds three results side by side; the top level keeps the ones
// that belong to the current mode:
//   double : P[105:51] and sticky T | OR(P[50:22])
//   upper single (H) : P[105:80] and sticky OR(P[79:58])
//   lower single (J) : P[47:22]  and sticky T
// In single mode the multiplier leaves P[57:48] zero, so the two lanes do not
// disturb each other, and the single add serves both lanes.
// Each result is normalized and rounded to nearest even by a norm_rnd
// instance. Outputs per result: fraction and exponent increment (0..2), plus
// the normalization and round-up indications. Purely combinational.
module add_norm_round
  import fpm_pkg::*;
(
  input  logic [PW-1:SPLIT] c_hi,        // carry vector, upper part
  input  logic [PW-1:SPLIT] s_hi,        // sum vector, upper part
  input  logic              cin,         // carry from the low part (carry network)
  input  logic              t,           // sticky of the low part
  output logic [DP_FW-1:0]  frac_d,      // double result fraction
  output logic [1:0]        inc_d,
  output logic [SP_FW-1:0]  frac_h,      // upper single result fraction
  output logic [1:0]        inc_h,
  output logic [SP_FW-1:0]  frac_j,      // lower single result fraction
  output logic [1:0]        inc_j,
  output logic [2:0]        shifted,     // {double, H, J}: product in [2,4)
  output logic [2:0]        rounded_up   // {double, H, J}: rounding added one ulp
);

  localparam int unsigned UW = PW - SPLIT;       // 84 bits added

  logic [PW-1:SPLIT] p;                          // exact product bits 105..22
  logic              t_d, t_h;

  always_comb begin
    p   = UW'(c_hi + s_hi + {{(UW-1){1'b0}}, cin});
    t_d = t | (|p[DP_MW-3:SPLIT]);                               // P[50:22]
    t_h = |p[HI_PLSB+SP_MW-3:HI_PLSB];                           // P[79:58]
  end

  norm_rnd #(.N(DP_MW)) u_rnd_d (
    .p_top(p[PW-1:DP_MW-2]), .t_low(t_d),
    .frac(frac_d), .inc(inc_d), .shifted(shifted[2]), .rounded_up(rounded_up[2])
  );

  norm_rnd #(.N(SP_MW)) u_rnd_h (
    .p_top(p[PW-1:HI_PLSB+SP_MW-2]), .t_low(t_h),
    .frac(frac_h), .inc(inc_h), .shifted(shifted[1]), .rounded_up(rounded_up[1])
  );

  norm_rnd #(.N(SP_MW)) u_rnd_j (
    .p_top(p[2*SP_MW-1:SPLIT]), .t_low(t),
    .frac(frac_j), .inc(inc_j), .shifted(shifted[0]), .rounded_up(rounded_up[0])
  );

endmodule
