// Testbench of add_norm_round. Exact mantissa products are split at random
// into carry and sum vectors; the carry-in and sticky of the low 22 bits are
// computed here by plain integer arithmetic. The rounded fractions and
// exponent increments are compared with the remainder-based reference
// rounding, for double products and for pairs of single products packed as
// the multiplier produces them. Mantissas with all ones force rounding
// carry-out, and exact halves exercise ties to even.
module tb_add_norm_round;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [PW-1:0]     c, s, p;
  logic              cin, t;
  logic [DP_FW-1:0]  frac_d;
  logic [SP_FW-1:0]  frac_h, frac_j;
  logic [1:0]        inc_d, inc_h, inc_j;
  logic [2:0]        shifted, rounded_up;
  int                n_carry_out = 0, n_tie = 0;

  add_norm_round dut (
    .c_hi(c[PW-1:SPLIT]), .s_hi(s[PW-1:SPLIT]), .cin(cin), .t(t),
    .frac_d(frac_d), .inc_d(inc_d), .frac_h(frac_h), .inc_h(inc_h),
    .frac_j(frac_j), .inc_j(inc_j), .shifted(shifted), .rounded_up(rounded_up)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd64(int bits);
    return {$urandom, $urandom} & ((64'd1 << bits) - 1);
  endfunction

  task automatic drive(logic [PW-1:0] prod);
    logic [22:0] low;
    p   = prod;
    c   = {rnd64(42), rnd64(64)};
    s   = p - c;
    low = {1'b0, c[SPLIT-1:0]} + {1'b0, s[SPLIT-1:0]};
    cin = low[SPLIT];
    t   = (low[SPLIT-1:0] != 0);
    #1;
  endtask

  task automatic cmp(string what, logic [127:0] prod, int n, logic [63:0] frac_got, int inc_got);
    logic [127:0] frac;
    int           inc;
    bit           sh, up;
    round_ref(prod, n, frac, inc, sh, up);
    checks++;
    if (frac[63:0] != frac_got || inc != inc_got) begin
      failures++;
      $display("FAIL %s p=%h: frac=%h inc=%0d expected %h %0d", what, prod, frac_got, inc_got, frac, inc);
    end
    if (up && frac == 0) n_carry_out++;   // rounding carried out of the mantissa
  endtask

  initial begin
    logic [52:0] a, b;
    logic [23:0] ah, bh, aj, bj;
    logic [PW-1:0] ph, pj;
    for (int i = 0; i < 3000; i++) begin
      a = {1'b1, 52'(rnd64(52))};
      b = {1'b1, 52'(rnd64(52))};
      if (i < 10) begin a = '1; b = (i == 0) ? '1 : {1'b1, 52'(rnd64(52)) | 52'hF_FFFF_FFFF_FF00}; end
      if (i >= 10 && i < 20) begin a = {1'b1, 52'd0}; b = {1'b1, 52'(rnd64(52)) & ~52'd1 | 52'd1}; end
      // products just below 2.0: rounding may carry out of the mantissa
      if (i >= 20 && i < 1000) b = 53'(((106'd1 << 105) - 1) / 106'(a));
      drive(106'(a) * 106'(b));
      cmp("double", 128'(p), 53, 64'(frac_d), int'(inc_d));

      ah = {1'b1, 23'($urandom)}; bh = {1'b1, 23'($urandom)};
      aj = {1'b1, 23'($urandom)}; bj = {1'b1, 23'($urandom)};
      if (i < 10) begin ah = '1; bh = '1; aj = '1; bj = 24'hFFF000 | 24'($urandom); end
      // exact tie: product with only the guard bit set below the mantissa
      if (i >= 10 && i < 20) begin ah = 24'h800001; bh = 24'h800000 | (24'd1 << 22); aj = 24'hC00000; bj = 24'h800001; n_tie++; end
      if (i >= 20 && i < 1000) begin
        bh = 24'(((48'd1 << 47) - 1) / 48'(ah));
        bj = 24'(((48'd1 << 47) - 1) / 48'(aj));
      end
      ph = 106'(ah) * 106'(bh);
      pj = 106'(aj) * 106'(bj);
      drive((ph << HI_PLSB) + pj);
      cmp("single H", 128'(ph), 24, 64'(frac_h), int'(inc_h));
      cmp("single J", 128'(pj), 24, 64'(frac_j), int'(inc_j));
    end
    checks++;
    if (n_carry_out == 0) begin failures++; $display("FAIL rounding carry-out never exercised"); end
    $display("rounding carry-outs: %0d, tie cases: %0d", n_carry_out, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
