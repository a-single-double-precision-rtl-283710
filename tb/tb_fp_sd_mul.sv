// End-to-end testbench of fp_sd_mul at its only (full) size.
//
// Alternates between double mode and single mode with random normal operands
// and directed corner cases. Every result and flag is compared with the
// integer reference model; double-precision results that are normal are also
// compared with the simulator's own IEEE double multiplication.
// Each mechanism of the design is counted and must occur at least once:
// both modes, switches between them, the normalization shift of a product in
// [2,4), rounding up, rounding carry-out of the mantissa, exponent overflow
// and exponent underflow, each in double mode and in the single lanes.
module tb_fp_sd_mul;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;

  int checks = 0, failures = 0;

  mode_e       sw, last_sw;
  logic [63:0] x, y, z;
  logic [1:0]  ovf, unf;

  // mechanism counters: index 0 double, 1 single lanes
  int n_ops[2], n_shift[2], n_up[2], n_cout[2], n_ovf[2], n_unf[2];
  int n_switch = 0;

  fp_sd_mul dut (.sw(sw), .x(x), .y(y), .z(z), .ovf(ovf), .unf(unf));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  // random normal operand field values with a chosen exponent range
  function automatic logic [63:0] rnd_dbl(int emin, int emax);
    return {1'($urandom), 11'($urandom_range(emin, emax)), 52'(rnd64())};
  endfunction

  function automatic logic [31:0] rnd_sgl(int emin, int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  task automatic count(int k, bit sh, bit up, logic [63:0] r, int fw, bit o, bit u);
    n_ops[k]++;
    if (sh) n_shift[k]++;
    if (up) n_up[k]++;
    if (up && !o && !u && (r & ((64'd1 << fw) - 1)) == 0) n_cout[k]++;
    if (o) n_ovf[k]++;
    if (u) n_unf[k]++;
  endtask

  task automatic run_double(logic [63:0] a, logic [63:0] b);
    logic [63:0] r, rr;
    bit o, u, sh, up;
    sw = MODE_DOUBLE; x = a; y = b;
    #1;
    if (sw != last_sw) n_switch++;
    last_sw = sw;
    r = fmul_ref(a, b, 11, 52, o, u, sh, up);
    count(0, sh, up, r, 52, o, u);
    checks++;
    if (z !== r || ovf !== {o, 1'b0} || unf !== {u, 1'b0}) begin
      failures++;
      $display("FAIL double %h * %h = %h ovf=%b unf=%b, expected %h %b %b", a, b, z, ovf, unf, r, o, u);
    end
    if (!o && !u) begin
      rr = $realtobits($bitstoreal(a) * $bitstoreal(b));
      checks++;
      if (z !== rr) begin
        failures++;
        $display("FAIL double %h * %h = %h, IEEE product %h", a, b, z, rr);
      end
    end
  endtask

  task automatic run_single(logic [31:0] a, logic [31:0] b, logic [31:0] c, logic [31:0] d);
    logic [63:0] rh, rj;
    bit oh, uh, shh, uph, oj, uj, shj, upj;
    sw = MODE_SINGLE; x = {a, c}; y = {b, d};
    #1;
    if (sw != last_sw) n_switch++;
    last_sw = sw;
    rh = fmul_ref({32'd0, a}, {32'd0, b}, 8, 23, oh, uh, shh, uph);
    rj = fmul_ref({32'd0, c}, {32'd0, d}, 8, 23, oj, uj, shj, upj);
    count(1, shh, uph, rh, 23, oh, uh);
    count(1, shj, upj, rj, 23, oj, uj);
    checks++;
    if (z !== {rh[31:0], rj[31:0]} || ovf !== {oh, oj} || unf !== {uh, uj}) begin
      failures++;
      $display("FAIL single {%h,%h} * {%h,%h} = %h ovf=%b unf=%b, expected %h%h %b%b %b%b",
               a, c, b, d, z, ovf, unf, rh[31:0], rj[31:0], oh, oj, uh, uj);
    end
  endtask

  task automatic require(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    logic [63:0] a;
    logic [31:0] p, q;
    last_sw = MODE_DOUBLE;

    // directed: 1.0 * 1.0, 1.5 * 1.5 (shift), all-ones mantissas
    run_double(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000);
    run_double(64'h3FF8_0000_0000_0000, 64'hBFF8_0000_0000_0000);
    run_double(64'h3FFF_FFFF_FFFF_FFFF, 64'h3FFF_FFFF_FFFF_FFFF);
    run_single(32'h3F80_0000, 32'h3F80_0000, 32'h3FC0_0000, 32'hBFC0_0000);
    run_single(32'h3FFF_FFFF, 32'h3FFF_FFFF, 32'h4000_0001, 32'h3F7F_FFFF);
    // directed overflow and underflow, per lane
    run_double(64'h7FE0_0000_0000_0000, 64'h4010_0000_0000_0000);
    run_double(64'h0010_0000_0000_0000, 64'h3E00_0000_0000_0000);
    run_single(32'h7F00_0000, 32'h4100_0000, 32'h3F80_0000, 32'h3F80_0000);
    run_single(32'h3F80_0000, 32'h3F80_0000, 32'h0080_0000, 32'h3000_0000);

    for (int i = 0; i < 4000; i++) begin
      case (i % 4)
        0: run_double(rnd_dbl(600, 1450), rnd_dbl(600, 1450));
        1: run_single(rnd_sgl(70, 185), rnd_sgl(70, 185), rnd_sgl(70, 185), rnd_sgl(70, 185));
        2: begin
             // products close below 2.0, where rounding can carry out
             a = rnd_dbl(900, 1100);
             run_double(a, {1'($urandom), 11'($urandom_range(900, 1100)),
                            52'(((106'd1 << 105) - 1) / 106'({1'b1, a[51:0]}))});
           end
        default: begin
             p = rnd_sgl(1, 254);
             q = rnd_sgl(100, 150);
             run_single(p, rnd_sgl(1, 254),
                        q, {1'($urandom), 8'($urandom_range(100, 150)),
                            23'(((48'd1 << 47) - 1) / 48'({1'b1, q[22:0]}))});
           end
      endcase
    end

    for (int k = 0; k < 2; k++) begin
      string m;
      m = (k == 0) ? "double" : "single";
      require({m, " operation"}, n_ops[k]);
      require({m, " normalization shift"}, n_shift[k]);
      require({m, " round up"}, n_up[k]);
      require({m, " rounding carry-out"}, n_cout[k]);
      require({m, " exponent overflow"}, n_ovf[k]);
      require({m, " exponent underflow"}, n_unf[k]);
      $display("%s: ops=%0d shift=%0d round_up=%0d carry_out=%0d ovf=%0d unf=%0d",
               m, n_ops[k], n_shift[k], n_up[k], n_cout[k], n_ovf[k], n_unf[k]);
    end
    require("mode switch", n_switch);
    $display("mode switches: %0d", n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
