// Testbench of cs_multiplier: in double mode the carry-save vectors must sum
// to the full 53x53 product; in single mode to the two lane products only,
// (a[52:29]*b[52:29] << 58) + a[23:0]*b[23:0], whatever the operand bits in
// between hold (region Z3) and however the cross products (Z1, Z2) would add.
module tb_cs_multiplier;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  mode_e        sw;
  logic [52:0]  a, b;
  logic [105:0] c, s, sum, ref_p;

  cs_multiplier dut (.a(a), .b(b), .sw(sw), .c(c), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    #1;
    sum = c + s;
    checks++;
    if (sum !== ref_p) begin
      failures++;
      $display("FAIL %s a=%h b=%h: c+s=%h expected %h", what, a, b, sum, ref_p);
    end
  endtask

  initial begin
    for (int i = 0; i < 600; i++) begin
      a = 53'({$urandom, $urandom});
      b = 53'({$urandom, $urandom});
      if (i == 0) begin a = '1; b = '1; end
      sw    = MODE_DOUBLE;
      ref_p = 106'(a) * 106'(b);
      check("double");
      sw    = MODE_SINGLE;
      ref_p = ((106'(a[52:29]) * 106'(b[52:29])) << 58) + 106'(a[23:0]) * 106'(b[23:0]);
      check("single");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
