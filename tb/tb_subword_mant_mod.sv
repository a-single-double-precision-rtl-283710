// Testbench of subword_mant_mod. In single mode the operands must carry each
// single mantissa with its hidden bit at bits 52..29 and 23..0 with zeros
// between; in double mode they must be the double mantissas with hidden bit.
// The lane values are also checked arithmetically.
module tb_subword_mant_mod;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  mode_e       sw;
  logic [51:0] mx, my;
  logic [22:0] ma, mb, mc, md;
  logic [52:0] opx, opy;

  subword_mant_mod dut (.sw(sw), .mx(mx), .my(my), .ma(ma), .mb(mb), .mc(mc), .md(md),
                        .opx(opx), .opy(opy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      ma = 23'($urandom); mb = 23'($urandom); mc = 23'($urandom); md = 23'($urandom);
      mx = 52'({$urandom, $urandom}); my = 52'({$urandom, $urandom});
      sw = MODE_SINGLE;
      #1;
      checks++;
      if (opx[52:29] != {1'b1, ma} || opx[28:24] != 5'd0 || opx[23:0] != {1'b1, mc} ||
          opy[52:29] != {1'b1, mb} || opy[28:24] != 5'd0 || opy[23:0] != {1'b1, md}) begin
        failures++;
        $display("FAIL ma=%h mb=%h mc=%h md=%h -> %h %h", ma, mb, mc, md, opx, opy);
      end
      // value check: upper lane holds 1.ma * 2^29, lower lane 1.md
      checks++;
      if ((64'(opx) >> 29) != 64'({1'b1, ma}) || (64'(opy) & 64'hFF_FFFF) != 64'({1'b1, md})) begin
        failures++;
        $display("FAIL lane values");
      end
      sw = MODE_DOUBLE;
      #1;
      checks++;
      if (opx != {1'b1, mx} || opy != {1'b1, my}) begin
        failures++;
        $display("FAIL double mx=%h my=%h -> %h %h", mx, my, opx, opy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
